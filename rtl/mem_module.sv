// mem_module: one physically independent memory module M_i.
//
// Every module has two ports. Port A is the private path from the one unit
// wired straight to it (processor P_i for M_0..M_{n-1}, the Processor
// Interface for M_{2n-1}); port B is the module's connection to the shared
// memory bus. The modules M_n..M_{2n-2} leave port A unused. The two-path
// arrangement follows the document's multiprocessor figure; the module size
// and the port timing are this design's own.
//
// Timing: synchronous. A request (en, we, addr, wdata) present at a clock
// edge is performed at that edge; a read returns the word on rdata after the
// edge (one cycle latency) and reads return the old contents when the same
// word is written. If both ports write the same word in one cycle the
// private port A wins. Contents start at zero (an initial block, usable in
// FPGA and simulation; an ASIC would clear the module by software).
module mem_module
  import mp_pkg::*;
#(
  parameter int unsigned AW = 10            // words = 2**AW
) (
  input  logic          clk,
  input  mem_req_t      a_req,
  output logic [DW-1:0] a_rdata,
  input  mem_req_t      b_req,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int unsigned w = 0; w < 2**AW; w++) mem[w] = '0;
  end

  wire [AW-1:0] a_addr = a_req.addr[AW-1:0];
  wire [AW-1:0] b_addr = b_req.addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (a_req.en) a_rdata <= mem[a_addr];
    if (b_req.en) b_rdata <= mem[b_addr];
    if (b_req.en && b_req.we && !(a_req.en && a_req.we && a_addr == b_addr))
      mem[b_addr] <= b_req.wdata;
    if (a_req.en && a_req.we)
      mem[a_addr] <= a_req.wdata;
  end

endmodule
