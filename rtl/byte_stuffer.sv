// byte_stuffer: copies Huffman-coded bytes to the output and inserts a 0x00 after every 0xFF,
// so that no coded byte pair can be taken for a JPEG marker. (The stuffing rule itself is the
// JPEG standard's; the design names this block but does not describe it.)
//
// Reads the output double FIFO (first-word-fall-through) and drives a one-register output
// stage with a valid/ready handshake: out_data is held while out_valid is high and out_ready
// is low. A 0xFF costs two output cycles. 'idle' is high when nothing is held or pending.
module byte_stuffer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_empty,
  output logic       in_rd,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  output logic       idle,
  output logic       ev_stuff
);

  logic stuff_pending;
  logic advance;

  assign advance  = !out_valid || out_ready;
  assign in_rd    = advance && !stuff_pending && !in_empty;
  assign idle     = !out_valid && !stuff_pending;
  assign ev_stuff = advance && stuff_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0; stuff_pending <= 1'b0;
    end else if (advance) begin
      if (stuff_pending) begin
        out_valid     <= 1'b1;
        out_data      <= 8'h00;
        stuff_pending <= 1'b0;
      end else if (!in_empty) begin
        out_valid     <= 1'b1;
        out_data      <= in_data;
        stuff_pending <= (in_data == 8'hFF);
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
