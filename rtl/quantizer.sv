// quantizer: divides each zig-zag ordered DCT coefficient by its quantization table entry and
// rounds to the nearest integer, out = ROUND(in / q(pos)).
//
// The table is a 64 x 8-bit RAM the host fills through the write port (qwr_*), one entry per
// zig-zag position, as the design specifies. Rounding is done exactly with the pipelined
// divider: |in| / q rounded is floor((2|in| + q) / (2q)); the sign is put back afterwards
// (ties round away from zero). A table entry of 0 is treated as 1 and the result saturates to
// 12 bits; both are this design's choices.
//
// Interface: in_pos is the zig-zag index of in_data (0 = DC). Timing: one coefficient per
// enabled cycle; out_valid follows in_valid after LATENCY = 15 enabled cycles.
module quantizer
  import jpeg_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic                     in_valid,
  input  logic [5:0]               in_pos,
  input  logic signed [COEF_W-1:0] in_data,
  output logic                     out_valid,
  output logic [5:0]               out_pos,
  output logic signed [COEF_W-1:0] out_data,
  // host write port of the quantization table
  input  logic                     qwr_en,
  input  logic [5:0]               qwr_addr,
  input  logic [QTAB_W-1:0]        qwr_data
);

  localparam int unsigned NUM_W = COEF_W + 1;   // 2|in| + q < 2^13
  localparam int unsigned DEN_W = QTAB_W + 1;   // 2q

  logic [QTAB_W-1:0] qram [64];
  always_ff @(posedge clk) begin
    if (qwr_en) qram[qwr_addr] <= qwr_data;
  end

  // stage 0: register magnitude/sign and read the table entry
  logic                 s0_valid, s0_neg;
  logic [5:0]           s0_pos;
  logic [COEF_W-1:0]    s0_mag;
  logic [QTAB_W-1:0]    s0_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid <= 1'b0; s0_neg <= 1'b0; s0_pos <= '0; s0_mag <= '0; s0_q <= '0;
    end else if (ce) begin
      s0_valid <= in_valid;
      s0_pos   <= in_pos;
      s0_neg   <= in_data[COEF_W-1];
      s0_mag   <= in_data[COEF_W-1] ? COEF_W'(-in_data) : COEF_W'(in_data);
      s0_q     <= (qram[in_pos] == '0) ? QTAB_W'(1) : qram[in_pos];
    end
  end

  logic [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  assign num = {s0_mag, 1'b0} + NUM_W'(s0_q);
  assign den = {s0_q, 1'b0};

  logic             d_valid;
  logic [NUM_W-1:0] d_quo;
  logic [6:0]       d_tag;
  div_pipe #(.NUM_W(NUM_W), .DEN_W(DEN_W), .TAG_W(7)) u_div (
    .clk, .rst_n, .ce, .in_valid(s0_valid), .num, .den, .in_tag({s0_neg, s0_pos}),
    .out_valid(d_valid), .quo(d_quo), .out_tag(d_tag));

  // final stage: restore the sign and saturate
  logic [NUM_W-1:0] mag_sat;
  assign mag_sat = (d_quo > NUM_W'(2047)) ? NUM_W'(2047) : d_quo;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_pos <= '0; out_data <= '0;
    end else if (ce) begin
      out_valid <= d_valid;
      out_pos   <= d_tag[5:0];
      out_data  <= d_tag[6] ? -$signed(COEF_W'(mag_sat)) : $signed(COEF_W'(mag_sat));
    end
  end

endmodule
