// zigzag: zig-zag reorder of an 8x8 coefficient block through a double-buffered memory.
//
// The 2-D DCT delivers each block column by column (sample n carries coefficient row n mod 8,
// column n/8). Each sample is written at the address the zig-zag table (Table I of the design,
// jpeg_pkg::ZIGZAG) gives for its natural position 8*row + col, so the block's zig-zag
// sequence lies at addresses 0..63 and is read out in order. The write addressing thus also
// performs the transpose the column-wise DCT output needs. Two banks let one block be read
// while the next is written (the same ping-pong rule as transpose_buffer).
//
// Timing: registered read; output samples appear in 64 consecutive enabled cycles, starting
// two enabled cycles after the block's last input sample. out_pos is the zig-zag index.
module zigzag
  import jpeg_pkg::*;
#(
  parameter int unsigned W = COEF_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [5:0]   out_pos,
  output logic [W-1:0] out_data
);

  logic [W-1:0] mem [2][64];
  logic [5:0] wcnt, rcnt;
  logic       wbank, rbank;
  logic [1:0] full;
  logic       reading;
  logic [5:0] waddr;

  assign waddr = ZIGZAG[{wcnt[2:0], wcnt[5:3]}];

  always_ff @(posedge clk) begin
    if (ce && in_valid) mem[wbank][waddr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; rcnt <= '0; wbank <= 1'b0; rbank <= 1'b0;
      full <= '0; reading <= 1'b0; out_valid <= 1'b0; out_data <= '0; out_pos <= '0;
    end else if (ce) begin
      logic [1:0] full_n;
      full_n = full;
      if (in_valid) begin
        wcnt <= wcnt + 6'd1;
        if (wcnt == 6'd63) begin
          full_n[wbank] = 1'b1;
          wbank <= ~wbank;
        end
      end
      out_valid <= 1'b0;
      if (reading || full[rbank]) begin
        out_data  <= mem[rbank][rcnt];
        out_pos   <= rcnt;
        out_valid <= 1'b1;
        reading   <= (rcnt != 6'd63);
        rcnt      <= rcnt + 6'd1;
        if (rcnt == 6'd63) begin
          full_n[rbank] = 1'b0;
          rbank <= ~rbank;
        end
      end
      full <= full_n;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (ce && in_valid) |-> !full[wbank]);

endmodule
