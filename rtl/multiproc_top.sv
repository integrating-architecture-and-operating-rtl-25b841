// multiproc_top: the multiple processor organization with its Processor
// Interface.
//
// n processors share 2n physically independent memory modules. Processor
// P_j has a private path to module M_j, where its programs normally live,
// and reaches every other module over one shared memory bus. Modules
// M_n..M_{2n-2} hold shared data and the operating system; M_{2n-1} belongs
// to the Processor Interface (PI), reached by the PI over its own private
// path and by the processors over the bus. The I/O processor (IOP) is a
// further bus master. Every processor reference passes through a
// relocation unit, then goes to the private path or the bus
// (proc_mem_port). Processors call the PI by writing a call word to their
// mailbox in M_{2n-1}; the PI answers with an instruction-complete pulse and
// may interrupt any processor to deliver a preempt or a signal.
//
// The processors themselves (microprogrammed bit-slice CPUs) and the IOP
// are outside this RTL: their connections are the ports below. Per
// processor j, arrays indexed [j]:
//   memory:      p_req, p_la, p_we, p_wdata, p_priv -> p_busy, p_done,
//                p_rdata, p_fault; relocation registers rel_we/rel_sel/rel_wdata
//   PI:          proc_areg, proc_pc (registers the PI reads), int_req ->
//                int_ack (forced interrupt with int_kind, int_pc, int_areg),
//                pi_done with pi_status and pi_data (instruction complete),
//                pi_sched_id/_s/_int (registers restored by SCHEDULE)
//   IOP:         iop_req -> iop_gnt, iop_rvalid, iop_rdata (bus master N)
// Physical address = {module number (clog2(2N) bits), AW-bit word}.
// The connections follow the document's organization figure; the widths,
// module size and handshakes are this design's own.
module multiproc_top
  import mp_pkg::*;
#(
  parameter int unsigned N    = 4,   // processors
  parameter int unsigned M    = 4,   // levels of multiprogramming
  parameter int unsigned H    = 4,   // ID register width
  parameter int unsigned QENT = 32,  // PI message queue entries
  parameter int unsigned AW   = 10   // word address bits per module
) (
  input  logic             clk,
  input  logic             rst_n,
  // processors' memory ports
  input  logic             p_req     [N],
  input  logic [ADDRW-1:0] p_la      [N],
  input  logic             p_we      [N],
  input  logic [DW-1:0]    p_wdata   [N],
  input  logic             p_priv    [N],
  output logic             p_busy    [N],
  output logic             p_done    [N],
  output logic [DW-1:0]    p_rdata   [N],
  output logic             p_fault   [N],
  input  logic             rel_we    [N],
  input  logic [1:0]       rel_sel   [N],
  input  logic [ADDRW-1:0] rel_wdata [N],
  output logic             used_private [N],
  output logic             used_bus     [N],
  // processors' side of the Processor Interface
  input  logic [ADDRW-1:0] proc_areg [N],
  input  logic [ADDRW-1:0] proc_pc   [N],
  output logic [N-1:0]     int_req,
  output int_kind_e        int_kind,
  output logic [ADDRW-1:0] int_pc,
  output logic [ADDRW-1:0] int_areg,
  input  logic [N-1:0]     int_ack,
  output logic [N-1:0]     pi_done,
  output pi_status_e       pi_status,
  output logic [DW-1:0]    pi_data,
  output logic [H-1:0]     pi_sched_id,
  output logic [H-1:0]     pi_sched_s,
  output logic [ADDRW-1:0] pi_sched_int,
  output logic             pi_ready,
  output logic             ev_delivered,
  output logic             ev_queued,
  output logic             ev_dequeued,
  output logic             ev_refused,
  // I/O processor on the shared bus
  input  mem_req_t         iop_req,
  output logic             iop_gnt,
  output logic             iop_rvalid,
  output logic [DW-1:0]    iop_rdata
);
  localparam int unsigned NS = 2 * N;
  localparam int unsigned NM = N + 1;

  mem_req_t      a_req   [NS];
  logic [DW-1:0] a_rdata [NS];
  mem_req_t      b_req   [NS];
  logic [DW-1:0] b_rdata [NS];

  mem_req_t      m_req   [NM];
  logic [NM-1:0] m_gnt, m_rvalid;
  logic [DW-1:0] m_rdata;

  // memory modules M_0 .. M_{2n-1}
  for (genvar s = 0; s < NS; s++) begin : g_mod
    mem_module #(.AW(AW)) u_mem (
      .clk,
      .a_req(a_req[s]), .a_rdata(a_rdata[s]),
      .b_req(b_req[s]), .b_rdata(b_rdata[s])
    );
  end

  // shared modules have no private path
  for (genvar s = N; s < NS - 1; s++) begin : g_noprivate
    assign a_req[s] = '0;
  end

  // processors' memory ports
  for (genvar j = 0; j < N; j++) begin : g_port
    proc_mem_port #(.J(j), .NS(NS), .AW(AW)) u_port (
      .clk, .rst_n,
      .p_req(p_req[j]), .p_la(p_la[j]), .p_we(p_we[j]), .p_wdata(p_wdata[j]),
      .p_priv(p_priv[j]), .p_busy(p_busy[j]), .p_done(p_done[j]),
      .p_rdata(p_rdata[j]), .p_fault(p_fault[j]),
      .rel_we(rel_we[j]), .rel_sel(rel_sel[j]), .rel_wdata(rel_wdata[j]),
      .priv_req(a_req[j]), .priv_rdata(a_rdata[j]),
      .bus_req(m_req[j]), .bus_gnt(m_gnt[j]), .bus_rvalid(m_rvalid[j]),
      .bus_rdata(m_rdata),
      .used_private(used_private[j]), .used_bus(used_bus[j])
    );
  end

  // the IOP is the last bus master
  assign m_req[N]   = iop_req;
  assign iop_gnt    = m_gnt[N];
  assign iop_rvalid = m_rvalid[N];
  assign iop_rdata  = m_rdata;

  shared_bus #(.NM(NM), .NS(NS), .AW(AW)) u_bus (
    .clk, .rst_n,
    .m_req, .m_gnt, .m_rvalid, .m_rdata,
    .s_req(b_req), .s_rdata(b_rdata)
  );

  processor_interface #(.N(N), .M(M), .H(H), .QENT(QENT), .AW(AW)) u_pi (
    .clk, .rst_n, .ready(pi_ready),
    .mem_req(a_req[NS-1]), .mem_rdata(a_rdata[NS-1]),
    .snoop_req(b_req[NS-1]),
    .proc_areg, .proc_pc,
    .int_req, .int_kind, .int_pc, .int_areg, .int_ack,
    .done(pi_done), .done_status(pi_status), .done_data(pi_data),
    .sched_id(pi_sched_id), .sched_s(pi_sched_s), .sched_int(pi_sched_int),
    .ev_delivered, .ev_queued, .ev_dequeued, .ev_refused
  );

endmodule
