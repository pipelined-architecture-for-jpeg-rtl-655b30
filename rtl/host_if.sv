// host_if: host programming interface (HOSTIF) of the encoder core.
//
// A simple word-addressed register port. Writes take effect on the clock edge with hp_wr high;
// reads are combinational. Register map (addresses in words):
//   0x00 CTRL    write bit 0 = 1 to start encoding an image (ignored while busy)
//   0x01 STATUS  read: bit 0 busy, bit 1 done (image completely encoded and output)
//   0x02 WIDTH   image width in pixels, multiple of 16 (reset value 640)
//   0x03 HEIGHT  image height in pixels, multiple of 8 (reset value 480)
//   0x40..0x7F   quantization table, entry (address - 0x40) in zig-zag order, 8 bits
// The quantization entries are forwarded to the quantizer's internal 64 x 8 RAM. The register
// map and the reset size (the 640 x 480 test image of the design's results) are this design's
// choices; the design only names the interface and the host-loaded quantization RAM.
module host_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  hp_addr,
  input  logic        hp_wr,
  input  logic [31:0] hp_wdata,
  output logic [31:0] hp_rdata,
  // to the core
  output logic        start,
  output logic [15:0] img_width,
  output logic [15:0] img_height,
  output logic        qwr_en,
  output logic [5:0]  qwr_addr,
  output logic [7:0]  qwr_data,
  input  logic        busy,
  input  logic        done
);

  localparam logic [7:0] A_CTRL = 8'h00, A_STATUS = 8'h01, A_WIDTH = 8'h02, A_HEIGHT = 8'h03;

  assign start    = hp_wr && hp_addr == A_CTRL && hp_wdata[0] && !busy;
  assign qwr_en   = hp_wr && hp_addr[7:6] == 2'b01;
  assign qwr_addr = hp_addr[5:0];
  assign qwr_data = hp_wdata[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_width  <= 16'd640;
      img_height <= 16'd480;
    end else if (hp_wr && !busy) begin
      if (hp_addr == A_WIDTH)  img_width  <= hp_wdata[15:0];
      if (hp_addr == A_HEIGHT) img_height <= hp_wdata[15:0];
    end
  end

  always_comb begin
    case (hp_addr)
      A_STATUS: hp_rdata = {30'd0, done, busy};
      A_WIDTH:  hp_rdata = {16'd0, img_width};
      A_HEIGHT: hp_rdata = {16'd0, img_height};
      default:  hp_rdata = '0;
    endcase
  end

endmodule
