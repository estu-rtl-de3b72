// estu_soc: the ESTU system-on-chip for a small, low-power FPGA.
//
// A bit-serial RISC-V control core (outside this design, connected through the wb_*
// bus ports) runs the application: it streams sensor samples in over SPI, turns them
// into spikes with the encoding slot, copies the spikes into the ESTU engine, starts
// the microcode program, feeds the output spikes to the decoding slot and sends the
// class out over UART. Between inferences it can put the whole system into stand-by
// through the wake-up timer, which stops the high-frequency oscillator.
//
// Bus: Wishbone-style, single master, 32-bit byte addresses, one access at a time;
// every slave inside acknowledges one cycle after the request. Address map
// (wb_adr[31:28]):
//   0  I/D memory            word = wb_adr[11:2]
//   1  ESTU engine           engine word address = wb_adr[21:2] (see estu_core)
//   2  encoding slot         0x00+4*ch write sample of channel ch; 0x40 threshold;
//                            0x44 read spikes / write to clear them (next time step);
//                            0x48 write resets the slot
//   3  decoding slot         0x0 write one time step of output spikes / read
//                            {count[15:0], class}; 0x4 write clears the counters
//   4  stand-by timer        0x0 sleep / {woke, sleep}; 0x4 wake-up delay
//   5  SPI window            forwarded to the spi_* ports (peripheral outside)
//   6  UART window           forwarded to the uart_* ports (peripheral outside)
// Other addresses acknowledge and read 0. clk is the gated high-frequency clock
// (it stops while hf_osc_en is low), lf_clk the low-frequency oscillator. The block
// set follows the published SoC diagram; the bus and the address map are this
// design's own.
module estu_soc #(
  parameter int NCH   = 16,
  parameter int NCLS  = 16,
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic        lf_clk,
  input  logic        rst_n,
  // bus from the control CPU
  input  logic        wb_cyc,
  input  logic        wb_we,
  input  logic [31:0] wb_adr,
  input  logic [31:0] wb_dat_w,
  input  logic [3:0]  wb_sel,
  output logic [31:0] wb_dat_r,
  output logic        wb_ack,
  // oscillator control
  output logic        hf_osc_en,
  // SPI peripheral window
  output logic        spi_cyc,
  output logic        spi_we,
  output logic [7:0]  spi_adr,
  output logic [31:0] spi_dat_w,
  input  logic [31:0] spi_dat_r,
  input  logic        spi_ack,
  // UART peripheral window
  output logic        uart_cyc,
  output logic        uart_we,
  output logic [7:0]  uart_adr,
  output logic [31:0] uart_dat_w,
  input  logic [31:0] uart_dat_r,
  input  logic        uart_ack,
  // engine status
  output logic        estu_busy,
  output logic        estu_done
);
  logic [3:0] sel;
  logic       req, ext, int_ack;
  logic [3:0] rsel_q;
  logic       radr_q;   // register select of the stand-by timer for the read-back cycle
  assign sel = wb_adr[31:28];
  assign ext = sel == 4'd5 || sel == 4'd6;
  // one request per access: internal slaves see it in the first cycle only
  assign req = wb_cyc && !int_ack && !ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_ack <= 1'b0;
      rsel_q  <= '0;
      radr_q  <= 1'b0;
    end else begin
      int_ack <= req;
      if (req) begin
        rsel_q <= sel;
        radr_q <= wb_adr[2];
      end
    end
  end

  // ---------------- I/D memory -----------------
  logic [31:0] idm_rdata;
  id_mem #(.WORDS(WORDS)) u_idmem (
    .clk, .req(req && sel == 4'd0), .we(wb_we), .be(wb_sel),
    .addr(wb_adr[2 +: $clog2(WORDS)]), .wdata(wb_dat_w), .rdata(idm_rdata));

  // ---------------- ESTU engine -----------------
  logic [31:0] estu_rdata;
  estu_core u_estu (
    .clk, .rst_n, .host_req(req && sel == 4'd1), .host_we(wb_we), .host_addr(wb_adr[21:2]),
    .host_wdata(wb_dat_w), .host_rdata(estu_rdata), .busy(estu_busy), .done(estu_done));

  // ---------------- encoding slot -----------------
  logic [15:0]      enc_thr;
  logic [2*NCH-1:0] enc_spk;
  logic             enc_wr;
  assign enc_wr = req && sel == 4'd2 && wb_we;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enc_thr <= '0;
    else if (enc_wr && wb_adr[7:0] == 8'h40) enc_thr <= wb_dat_w[15:0];
  end
  enc_slot #(.NCH(NCH)) u_enc (
    .clk, .rst_n, .clear(enc_wr && wb_adr[7:0] == 8'h48), .take(enc_wr && wb_adr[7:0] == 8'h44),
    .thr(enc_thr), .in_valid(enc_wr && wb_adr[7:6] == 2'b00), .in_ch(wb_adr[2 +: $clog2(NCH)]),
    .in_x(wb_dat_w[15:0]), .spk(enc_spk));

  // ---------------- decoding slot -----------------
  logic [$clog2(NCLS)-1:0] dec_cls;
  logic [15:0]             dec_cnt;
  logic                    dec_wr;
  assign dec_wr = req && sel == 4'd3 && wb_we;
  dec_slot #(.NCLS(NCLS), .CNT_W(16)) u_dec (
    .clk, .rst_n, .clear(dec_wr && wb_adr[2]), .in_valid(dec_wr && !wb_adr[2]),
    .in_spk(wb_dat_w[NCLS-1:0]), .cls(dec_cls), .cnt_max(dec_cnt));

  // ---------------- stand-by timer -----------------
  logic [31:0] pwr_rdata;
  pwr_timer u_pwr (
    .clk, .lf_clk, .rst_n, .reg_we(req && sel == 4'd4 && wb_we),
    .reg_addr(req ? wb_adr[2] : radr_q), .reg_wdata(wb_dat_w), .reg_rdata(pwr_rdata),
    .hf_osc_en);

  // ---------------- external peripherals -----------------
  assign spi_cyc    = wb_cyc && sel == 4'd5;
  assign spi_we     = wb_we;
  assign spi_adr    = wb_adr[7:0];
  assign spi_dat_w  = wb_dat_w;
  assign uart_cyc   = wb_cyc && sel == 4'd6;
  assign uart_we    = wb_we;
  assign uart_adr   = wb_adr[7:0];
  assign uart_dat_w = wb_dat_w;

  // ---------------- read-back -----------------
  always_comb begin
    wb_ack   = int_ack;
    wb_dat_r = '0;
    if (ext) begin
      wb_ack   = (sel == 4'd5) ? spi_ack : uart_ack;
      wb_dat_r = (sel == 4'd5) ? spi_dat_r : uart_dat_r;
    end else begin
      unique case (rsel_q)
        4'd0: wb_dat_r = idm_rdata;
        4'd1: wb_dat_r = estu_rdata;
        4'd2: wb_dat_r = 32'(enc_spk);
        4'd3: wb_dat_r = {dec_cnt, 16'(dec_cls)};
        4'd4: wb_dat_r = pwr_rdata;
        default: wb_dat_r = '0;
      endcase
    end
  end

endmodule
