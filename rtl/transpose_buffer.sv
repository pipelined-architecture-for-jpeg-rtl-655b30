// transpose_buffer: ping-pong 8x8 memory that turns the row-wise output of the first 1-D DCT
// into the column-wise input of the second.
//
// Two banks of 64 words. The writer fills one bank in arrival order (address = 8*row + col);
// when a bank holds 64 samples it is marked full and the writer moves to the other bank. The
// reader, when idle, takes the oldest full bank and reads it in 64 consecutive enabled cycles
// at address 8*(n mod 8) + n/8, i.e. transposed, then frees it. Because the writer needs at
// least 64 cycles to fill a bank and the reader empties one in exactly 64, the writer never
// finds its bank still full (an assertion checks this). The ping-pong arrangement is this
// design's choice; the architecture names only a transpose buffer between the two 1-D DCTs.
//
// Timing: read data is registered; out_valid follows the read address by one enabled cycle.
// Latency from the 64th write to the first output is two enabled cycles.
module transpose_buffer #(
  parameter int unsigned W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic                in_valid,
  input  logic [W-1:0]        in_data,
  output logic                out_valid,
  output logic [W-1:0]        out_data
);

  logic [W-1:0] mem [2][64];
  logic [5:0] wcnt, rcnt;
  logic       wbank, rbank;
  logic [1:0] full;
  logic       reading;

  always_ff @(posedge clk) begin
    if (ce && in_valid) mem[wbank][wcnt] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; rcnt <= '0; wbank <= 1'b0; rbank <= 1'b0;
      full <= '0; reading <= 1'b0; out_valid <= 1'b0; out_data <= '0;
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
        out_data  <= mem[rbank][{rcnt[2:0], rcnt[5:3]}];
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

  // the writer must never overwrite a bank that has not been read out
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (ce && in_valid) |-> !full[wbank]);

endmodule
