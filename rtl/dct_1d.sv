// dct_1d: 8-point one-dimensional DCT (the "8x1 DCT" unit), serial in and serial out.
//
// Computes X(u) = c(u)/2 * sum_k x(k) cos((2k+1) u pi / 16), c(0) = 1/sqrt(2), c(u>0) = 1,
// for u = 0..7. Eight multiply-accumulate lanes, one per output u, each take every input
// sample x(k) times a 12-fraction-bit constant from jpeg_pkg::dct_coef. After the eighth
// sample the eight sums are rounded (add half, arithmetic shift right by SHIFT), saturated to
// OUT_W bits and loaded into an output shift register that presents X(0)..X(7) on the next
// eight enabled cycles. The direct multiply-accumulate form is this design's choice; the
// architecture only fixes the row-column use of two such units around a transpose buffer.
//
// Timing: input samples arrive on enabled cycles with in_valid (gaps allowed). out_valid rises
// on the enabled cycle after the eighth sample and stays for eight enabled cycles. Input rate
// at most one sample per cycle, so one group's output always ends before the next is loaded.
module dct_1d
  import jpeg_pkg::*;
#(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 13,
  parameter int unsigned SHIFT = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned ACC_W = IN_W + 16;

  // COEF[8*u + k] = dct_coef(u, k)
  typedef int coef_vec_t [64];
  function automatic coef_vec_t build_coef();
    coef_vec_t m;
    for (int i = 0; i < 64; i++) m[i] = dct_coef(i / 8, i % 8);
    return m;
  endfunction
  localparam coef_vec_t COEF = build_coef();

  logic [2:0] k;
  logic signed [ACC_W-1:0] acc  [8];
  logic signed [ACC_W-1:0] nsum [8];
  logic signed [OUT_W-1:0] obuf [8];
  logic [3:0] ocnt;

  always_comb begin
    for (int u = 0; u < 8; u++)
      nsum[u] = ((k == 3'd0) ? ACC_W'(0) : acc[u])
              + ACC_W'(in_data * $signed(16'(COEF[8*u + int'(k)])));
  end

  function automatic logic signed [OUT_W-1:0] round_sat(logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] r;
    r = (v + ACC_W'(1 <<< (SHIFT - 1))) >>> SHIFT;
    if (r > ACC_W'((1 <<< (OUT_W - 1)) - 1))   return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -ACC_W'(1 <<< (OUT_W - 1)))        return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k    <= '0;
      ocnt <= '0;
      for (int u = 0; u < 8; u++) begin
        acc[u]  <= '0;
        obuf[u] <= '0;
      end
    end else if (ce) begin
      if (in_valid) begin
        k <= k + 3'd1;
        for (int u = 0; u < 8; u++) acc[u] <= nsum[u];
      end
      if (in_valid && k == 3'd7) begin
        for (int u = 0; u < 8; u++) obuf[u] <= round_sat(nsum[u]);
        ocnt <= 4'd8;
      end else if (ocnt != 4'd0) begin
        for (int u = 0; u < 7; u++) obuf[u] <= obuf[u+1];
        ocnt <= ocnt - 4'd1;
      end
    end
  end

  assign out_valid = (ocnt != 4'd0);
  assign out_data  = obuf[0];

endmodule
