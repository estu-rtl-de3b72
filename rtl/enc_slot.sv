// enc_slot: encoding slot, delta-modulation spike encoder for sensor streams.
//
// Each of NCH sensor channels keeps a reference level. A new sample x for channel
// ch is compared with it: if x - ref >= thr the channel emits an UP spike and ref
// rises by thr; if ref - x >= thr it emits a DOWN spike and ref falls by thr. UP of
// channel ch is spike bit 2*ch, DOWN is bit 2*ch+1, so 16 channels give the 32 input
// spike channels of one time step. Spikes collect in spk until take is pulsed (the
// start of the next time step); clear also resets every reference to zero.
// Timing: one sample per cycle (in_valid, in_ch, in_x); spk shows the result the
// cycle after the sample. Using delta modulation and 32 spike channels follows the
// published sEMG application; the step size, the bit order and the one-spike-per-
// sample limit are this design's choices.
module enc_slot #(
  parameter int NCH      = 16,
  parameter int SAMPLE_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       take,
  input  logic [SAMPLE_W-1:0]        thr,
  input  logic                       in_valid,
  input  logic [$clog2(NCH)-1:0]     in_ch,
  input  logic signed [SAMPLE_W-1:0] in_x,
  output logic [2*NCH-1:0]           spk
);
  logic signed [SAMPLE_W-1:0] ref_lv [NCH];
  logic signed [SAMPLE_W:0]   diff, thr_s;
  logic                       up, dn;

  always_comb begin
    diff  = (SAMPLE_W+1)'(in_x) - (SAMPLE_W+1)'(ref_lv[in_ch]);
    thr_s = signed'({1'b0, thr});
    up    = diff >= thr_s;
    dn    = -diff >= thr_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spk <= '0;
      for (int c = 0; c < NCH; c++) ref_lv[c] <= '0;
    end else if (clear) begin
      spk <= '0;
      for (int c = 0; c < NCH; c++) ref_lv[c] <= '0;
    end else begin
      if (take) spk <= '0;
      if (in_valid) begin
        if (up) begin
          ref_lv[in_ch] <= ref_lv[in_ch] + signed'(thr);
          spk[2*in_ch]  <= 1'b1;
        end else if (dn) begin
          ref_lv[in_ch]  <= ref_lv[in_ch] - signed'(thr);
          spk[2*in_ch+1] <= 1'b1;
        end
      end
    end
  end

endmodule
