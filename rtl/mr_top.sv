// mr_top: the complete MR machine, processor and 256 x 16-bit memory.
//
// The machine itself has no input or output: programs and data live in the
// memory. To put a program in and to read results out, the top has a
// memory access port (ext_*). While ext_en is 1 the port owns the memory:
// ext_addr addresses it, ext_rdata shows the word combinationally, and
// ext_we = 1 writes ext_wdata at the rising clock edge. Hold rst at 1 while
// using the port, so the processor does not run; release rst (with ext_en =
// 0) to start execution at address 0. state and pc are observation outputs.
// The access port and its multiplexer are this design's addition; the rest
// follows the published machine.
module mr_top
  import mr_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ext_en,
  input  logic   ext_we,
  input  addr_t  ext_addr,
  input  word_t  ext_wdata,
  output word_t  ext_rdata,
  output state_e state,
  output addr_t  pc
);

  word_t cpu_wdata;
  addr_t cpu_addr;
  logic  cpu_rw;
  word_t mem_dout;

  addr_t ram_addr;
  word_t ram_din;
  logic  ram_rw;

  mr_cpu u_cpu (
    .clk       (clk),
    .rst       (rst),
    .mem_rdata (mem_dout),
    .mem_wdata (cpu_wdata),
    .mem_addr  (cpu_addr),
    .mem_rw    (cpu_rw),
    .state     (state),
    .pc        (pc)
  );

  assign ram_addr  = ext_en ? ext_addr  : cpu_addr;
  assign ram_din   = ext_en ? ext_wdata : cpu_wdata;
  assign ram_rw    = ext_en ? ext_we    : (cpu_rw && !rst);
  assign ext_rdata = mem_dout;

  mr_ram #(
    .DEPTH (MEM_DEPTH),
    .WIDTH (WORD_W)
  ) u_ram (
    .clk  (clk),
    .addr (ram_addr),
    .din  (ram_din),
    .rw   (ram_rw),
    .dout (mem_dout)
  );

endmodule
