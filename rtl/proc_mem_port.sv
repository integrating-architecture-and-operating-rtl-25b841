// proc_mem_port: memory port of processor P_J.
//
// Each processor has a private path to its own module M_J and a path over
// the shared bus to all other modules; programs are loaded so that most
// references go to M_J. This port takes one reference at a time from the
// processor, relocates it (reloc_unit, two cycles), and sends it over the
// private path when the physical address falls in M_J, otherwise over the
// shared bus, where it waits for a grant. The routing rule follows the
// document's memory organization; the handshake is this design's own.
//
// Processor side: p_req (one cycle, accepted when p_busy is low) with p_la,
// p_we, p_wdata, p_priv; p_done pulses once with p_rdata (reads) or p_fault
// (relocation fault, nothing accessed). Relocation registers are written via
// rel_we/rel_sel/rel_wdata. Latency: 2 relocation cycles, then 2 cycles on
// the private path, or 1 cycle plus bus wait (writes) / 2 cycles plus bus
// wait (reads) on the bus.
module proc_mem_port
  import mp_pkg::*;
#(
  parameter int unsigned J  = 0,   // this processor's number
  parameter int unsigned NS = 8,   // number of modules (2n)
  parameter int unsigned AW = 10   // word address bits within a module
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor side
  input  logic             p_req,
  input  logic [ADDRW-1:0] p_la,
  input  logic             p_we,
  input  logic [DW-1:0]    p_wdata,
  input  logic             p_priv,
  output logic             p_busy,
  output logic             p_done,
  output logic [DW-1:0]    p_rdata,
  output logic             p_fault,
  input  logic             rel_we,
  input  logic [1:0]       rel_sel,
  input  logic [ADDRW-1:0] rel_wdata,
  // private path to M_J
  output mem_req_t         priv_req,
  input  logic [DW-1:0]    priv_rdata,
  // shared bus
  output mem_req_t         bus_req,
  input  logic             bus_gnt,
  input  logic             bus_rvalid,
  input  logic [DW-1:0]    bus_rdata,
  // statistics for observation
  output logic             used_private,
  output logic             used_bus
);
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  typedef enum logic [2:0] {IDLE, RELOC, PRIV1, PRIV2, BUS, BWAIT} st_e;
  st_e st;

  logic             r_valid, r_fault;
  logic [ADDRW-1:0] r_pa;
  logic             we_q;
  logic [DW-1:0]    wdata_q;

  reloc_unit u_reloc (
    .clk, .rst_n,
    .reg_we(rel_we), .reg_sel(rel_sel), .reg_wdata(rel_wdata),
    .in_valid(p_req && st == IDLE), .la(p_la), .priv(p_priv),
    .out_valid(r_valid), .pa(r_pa), .fault(r_fault)
  );

  assign p_busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= IDLE;
      we_q         <= 1'b0;
      wdata_q      <= '0;
      priv_req     <= '0;
      bus_req      <= '0;
      p_done       <= 1'b0;
      p_rdata      <= '0;
      p_fault      <= 1'b0;
      used_private <= 1'b0;
      used_bus     <= 1'b0;
    end else begin
      p_done       <= 1'b0;
      priv_req.en  <= 1'b0;
      used_private <= 1'b0;
      used_bus     <= 1'b0;
      unique case (st)
        IDLE: if (p_req) begin
          we_q    <= p_we;
          wdata_q <= p_wdata;
          st      <= RELOC;
        end
        RELOC: if (r_valid) begin
          if (r_fault) begin
            p_done  <= 1'b1;
            p_fault <= 1'b1;
            st      <= IDLE;
          end else if (r_pa[AW +: SW] == SW'(J)) begin
            priv_req     <= '{en: 1'b1, we: we_q, addr: r_pa, wdata: wdata_q};
            used_private <= 1'b1;
            st           <= PRIV1;
          end else begin
            bus_req  <= '{en: 1'b1, we: we_q, addr: r_pa, wdata: wdata_q};
            used_bus <= 1'b1;
            st       <= BUS;
          end
        end
        PRIV1: st <= PRIV2;
        PRIV2: begin
          p_done  <= 1'b1;
          p_fault <= 1'b0;
          p_rdata <= priv_rdata;
          st      <= IDLE;
        end
        BUS: if (bus_gnt) begin
          bus_req.en <= 1'b0;
          if (bus_req.we) begin
            p_done  <= 1'b1;
            p_fault <= 1'b0;
            st      <= IDLE;
          end else begin
            st <= BWAIT;
          end
        end
        BWAIT: if (bus_rvalid) begin
          p_done  <= 1'b1;
          p_fault <= 1'b0;
          p_rdata <= bus_rdata;
          st      <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
