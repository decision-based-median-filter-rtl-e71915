// Image RAM: one grayscale frame, one write port and one synchronous read port.
//
// DEPTH pixels of 8 bits. A write (we) stores wdata at waddr on the clock
// edge; a read returns mem[raddr] on the clock edge after raddr is presented
// (one clock of latency, the behaviour of a block RAM). A read of the
// address being written in the same clock returns the old contents.
// If INIT_FILE is not empty the array is filled from that hex file at
// start-up, the way an FPGA configuration can preload a block RAM.
//
// The system uses two of these: the received image and the filtered image.
// The published design keeps the image in on-chip block RAM; the port arrangement
// and the second (output) frame are this design's choices.
module image_ram
  import dbmf_pkg::*;
#(
  parameter int unsigned DEPTH     = 7500,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  pixel_t                   wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output pixel_t                   rdata
);

  pixel_t mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
