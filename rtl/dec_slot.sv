// dec_slot: decoding slot, spike-rate classifier.
//
// Counts, for each of NCLS output neurons (one per class), the spikes it emits over
// the time steps of one inference, and reports the class with the highest count
// (the lowest index wins a tie) together with that count. in_valid with in_spk adds
// one time step; clear starts a new inference. Counters saturate at their maximum.
// cls and cnt_max are combinational from the counters, so they are valid the cycle
// after the last in_valid. Spike-rate evaluation follows the published description;
// the counter width, the class count and the tie rule are this design's choices.
module dec_slot #(
  parameter int NCLS  = 16,
  parameter int CNT_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      in_valid,
  input  logic [NCLS-1:0]           in_spk,
  output logic [$clog2(NCLS)-1:0]   cls,
  output logic [CNT_W-1:0]          cnt_max
);
  logic [CNT_W-1:0] cnt [NCLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCLS; k++) cnt[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < NCLS; k++) cnt[k] <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < NCLS; k++)
        if (in_spk[k] && cnt[k] != '1) cnt[k] <= cnt[k] + 1'b1;
    end
  end

  always_comb begin
    cls     = '0;
    cnt_max = cnt[0];
    for (int k = 1; k < NCLS; k++)
      if (cnt[k] > cnt_max) begin
        cnt_max = cnt[k];
        cls     = ($clog2(NCLS))'(k);
      end
  end

endmodule
