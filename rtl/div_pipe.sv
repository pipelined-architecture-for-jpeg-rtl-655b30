// div_pipe: fully pipelined unsigned restoring divider, one quotient bit per stage.
//
// Computes quo = num / den (den > 0) and carries a TAG_W-bit side tag along. Stage i compares
// the running partial remainder, extended by the next numerator bit, with the divisor and
// subtracts it when it fits. One division enters per enabled cycle; the result leaves NUM_W
// enabled cycles later. Used by the quantizer, which the design describes as a divider that
// works "in a pipelined way"; the restoring form is this design's choice.
module div_pipe #(
  parameter int unsigned NUM_W = 13,
  parameter int unsigned DEN_W = 9,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [NUM_W-1:0] quo,
  output logic [TAG_W-1:0] out_tag
);

  // per-stage state: numerator bits still to shift in, partial remainder, quotient so far
  logic             v   [NUM_W+1];
  logic [NUM_W-1:0] n   [NUM_W+1];
  logic [DEN_W:0]   rem [NUM_W+1];
  logic [NUM_W-1:0] q   [NUM_W+1];
  logic [DEN_W-1:0] d   [NUM_W+1];
  logic [TAG_W-1:0] t   [NUM_W+1];

  assign v[0]   = in_valid;
  assign n[0]   = num;
  assign rem[0] = '0;
  assign q[0]   = '0;
  assign d[0]   = den;
  assign t[0]   = in_tag;

  for (genvar s = 0; s < NUM_W; s++) begin : g_stage
    logic [DEN_W+1:0] trial;
    logic             fits;
    assign trial = {rem[s], n[s][NUM_W-1]};
    assign fits  = trial >= {2'b00, d[s]};
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[s+1] <= 1'b0; n[s+1] <= '0; rem[s+1] <= '0; q[s+1] <= '0; d[s+1] <= '0; t[s+1] <= '0;
      end else if (ce) begin
        v[s+1]   <= v[s];
        n[s+1]   <= {n[s][NUM_W-2:0], 1'b0};
        rem[s+1] <= fits ? (DEN_W+1)'(trial - {2'b00, d[s]}) : trial[DEN_W:0];
        q[s+1]   <= {q[s][NUM_W-2:0], fits};
        d[s+1]   <= d[s];
        t[s+1]   <= t[s];
      end
    end
  end

  assign out_valid = v[NUM_W];
  assign quo       = q[NUM_W];
  assign out_tag   = t[NUM_W];

endmodule
