// pwr_timer: stand-by control and wake-up timer.
//
// The system CPU asks for stand-by by writing 1 to the sleep register (reg_addr 0)
// after loading the wake-up delay (reg_addr 1, in low-frequency clock periods).
// The request crosses into the lf_clk domain through a two-flop synchroniser; there
// the controller drops hf_osc_en, which stops the high-frequency oscillator and with
// it every clock of the system, and counts wake_cycles ticks of the low-frequency
// clock. It then raises hf_osc_en again and sets the woke flag; the CPU resumes,
// reads {woke, sleep} at reg_addr 0 and writes 0 to the sleep register, which lets
// the controller return to idle. Register reads are combinational.
// Stand-by by oscillator shutdown, control by the CPU and a timer on the
// low-frequency oscillator follow the published design; the register map, the
// handshake and the counter width are this design's own.
module pwr_timer #(
  parameter int CNT_W = 24
) (
  input  logic             clk,       // high-frequency (gated) clock
  input  logic             lf_clk,    // low-frequency oscillator clock
  input  logic             rst_n,
  input  logic             reg_we,
  input  logic             reg_addr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  output logic             hf_osc_en
);
  typedef enum logic [1:0] {P_IDLE, P_SLEEP, P_WAKE} pstate_e;

  // high-frequency side
  logic             sleep_q;
  logic [CNT_W-1:0] wake_cycles;
  logic [1:0]       woke_sync;

  // low-frequency side
  pstate_e          ps;
  logic [1:0]       req_sync;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sleep_q     <= 1'b0;
      wake_cycles <= '0;
      woke_sync   <= '0;
    end else begin
      woke_sync <= {woke_sync[0], ps == P_WAKE};
      if (reg_we && !reg_addr) sleep_q     <= reg_wdata[0];
      if (reg_we &&  reg_addr) wake_cycles <= reg_wdata[CNT_W-1:0];
    end
  end

  assign reg_rdata = reg_addr ? 32'(wake_cycles) : {30'h0, woke_sync[1], sleep_q};

  always_ff @(posedge lf_clk or negedge rst_n) begin
    if (!rst_n) begin
      ps       <= P_IDLE;
      req_sync <= '0;
      cnt      <= '0;
    end else begin
      req_sync <= {req_sync[0], sleep_q};
      unique case (ps)
        P_IDLE:  if (req_sync[1]) begin ps <= P_SLEEP; cnt <= '0; end
        P_SLEEP: if (cnt + 1'b1 >= wake_cycles) ps <= P_WAKE;
                 else cnt <= cnt + 1'b1;
        P_WAKE:  if (!req_sync[1]) ps <= P_IDLE;
        default: ps <= P_IDLE;
      endcase
    end
  end

  assign hf_osc_en = ps != P_SLEEP;

endmodule
