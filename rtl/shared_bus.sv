// shared_bus: the shared memory bus between the masters and all modules.
//
// Besides its private path, every processor reaches every memory module
// over one shared bus; the I/O processor (IOP) hangs on the same bus. The
// bus carries one reference per cycle. Masters that request together are
// served round robin (rr_arbiter). The granted reference is steered to the
// bus port of the module named by the high address bits, and a read's data
// comes back one cycle later with m_rvalid for the master that issued it.
// The document shows only the bus's connections; arbitration and timing
// are this design's own.
//
// Interface: m_req[NM] held by each master until m_gnt; m_gnt one-hot,
// combinational; m_rvalid/m_rdata one cycle after a granted read.
// s_req[NS]/s_rdata[NS] go to the modules' bus ports.
// Physical address = {module number, AW-bit word address}.
module shared_bus
  import mp_pkg::*;
#(
  parameter int unsigned NM = 5,   // masters: n processors and the IOP
  parameter int unsigned NS = 8,   // memory modules: 2n
  parameter int unsigned AW = 10   // word address bits within a module
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mem_req_t      m_req   [NM],
  output logic [NM-1:0] m_gnt,
  output logic [NM-1:0] m_rvalid,
  output logic [DW-1:0] m_rdata,
  output mem_req_t      s_req   [NS],
  input  logic [DW-1:0] s_rdata [NS]
);
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [NM-1:0]  req_vec;
  logic [MW-1:0]  gidx;
  logic           any;
  mem_req_t       sel;
  logic [SW-1:0]  sidx;

  always_comb
    for (int unsigned k = 0; k < NM; k++) req_vec[k] = m_req[k].en;

  rr_arbiter #(.N(NM)) u_arb (
    .clk, .rst_n, .req(req_vec), .advance(1'b1),
    .gnt(m_gnt), .gnt_idx(gidx), .any_gnt(any)
  );

  always_comb begin
    sel  = m_req[gidx];
    sidx = sel.addr[AW +: SW];
    for (int unsigned s = 0; s < NS; s++) begin
      s_req[s]    = sel;
      s_req[s].en = any && (sidx == SW'(s));
    end
  end

  // Return path for reads.
  logic          rd_pend;
  logic [MW-1:0] rd_master;
  logic [SW-1:0] rd_slave;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend   <= 1'b0;
      rd_master <= '0;
      rd_slave  <= '0;
    end else begin
      rd_pend   <= any && !sel.we;
      rd_master <= gidx;
      rd_slave  <= sidx;
    end
  end

  always_comb begin
    m_rvalid = '0;
    m_rvalid[rd_master] = rd_pend;
    m_rdata = s_rdata[rd_slave];
  end

  // A grant goes only to a requesting master.
  a_gnt_only_to_req: assert property (@(posedge clk) disable iff (!rst_n)
    (m_gnt & ~req_vec) == '0);

endmodule
