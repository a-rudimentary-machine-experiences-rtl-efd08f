// mr_ram: the MR main memory, DEPTH words of WIDTH bits (256 x 16).
//
// One address, separate data-in and data-out ports and a R/W line. dout
// shows the addressed word combinationally (asynchronous read); when rw is 1
// the word at addr takes din at the rising clock edge. The read and write
// timing is a design choice that lets the CPU fetch or load a word in the
// same cycle as it presents the address. Contents are not reset.
module mr_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  input  logic             rw,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  assign dout = mem[addr];

  always_ff @(posedge clk) begin
    if (rw) mem[addr] <= din;
  end

endmodule
