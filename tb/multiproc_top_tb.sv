// multiproc_top_tb: end-to-end run of the whole organization at its default
// size (4 processors, 8 modules of 1024 words, 4 levels, 4-bit IDs).
//
// The testbench plays the four processors and the I/O processor. Every
// processor runs a two-segment program space (16 words in its own module,
// the rest in a shared module) and makes random references at the same
// time as the others and the IOP, so that the private paths, the shared
// bus and bus contention all occur; read data is checked against a
// reference memory. It then checks a relocation bound fault, an
// unprivileged absolute reference, data shared between processors through
// a shared module, and process communication through the Processor
// Interface: calls written to the mailboxes in M_7 over the bus, a signal
// delivered at once, one queued and delivered later, a refused preempt,
// and two processors calling the PI at the same time. Each of these is
// counted and a failure is counted for any that never happened.
module multiproc_top_tb;
  import mp_pkg::*;
  localparam int N = 4, AW = 10;
  // word addresses in M_7 with 32 queue entries and 16 processes
  localparam int L = 64, K = 128, J = 132, I = 136;
  localparam logic [15:0] PI_MOD = 16'(2 * N - 1) << AW;

  logic clk = 0, rst_n = 1;
  logic             p_req [N], p_we [N], p_priv [N], p_busy [N], p_done [N], p_fault [N];
  logic [ADDRW-1:0] p_la [N];
  logic [DW-1:0]    p_wdata [N], p_rdata [N];
  logic             rel_we [N];
  logic [1:0]       rel_sel [N];
  logic [ADDRW-1:0] rel_wdata [N];
  logic             used_private [N], used_bus [N];
  logic [ADDRW-1:0] proc_areg [N], proc_pc [N];
  logic [N-1:0]     int_req, int_ack, pi_done;
  int_kind_e        int_kind;
  logic [ADDRW-1:0] int_pc, int_areg;
  pi_status_e       pi_status;
  logic [DW-1:0]    pi_data;
  logic [3:0]       pi_sched_id, pi_sched_s;
  logic [ADDRW-1:0] pi_sched_int;
  logic             pi_ready, ev_delivered, ev_queued, ev_dequeued, ev_refused;
  mem_req_t         iop_req;
  logic             iop_gnt, iop_rvalid;
  logic [DW-1:0]    iop_rdata;

  multiproc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_private = 0, n_bus = 0, n_contend = 0, n_fault = 0, n_abs = 0, n_shared = 0;
  int n_deliv = 0, n_queue = 0, n_deq = 0, n_refuse = 0, n_pi_together = 0, n_iop = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int j = 0; j < N; j++) begin
      if (used_private[j]) n_private++;
      if (used_bus[j])     n_bus++;
    end
    if ($countones(dut.u_bus.req_vec) > 1) n_contend++;
    if ($countones(dut.u_pi.pending) > 1)  n_pi_together++;
    if (ev_delivered) n_deliv++;
    if (ev_queued)    n_queue++;
    if (ev_dequeued)  n_deq++;
    if (ev_refused)   n_refuse++;
  end

  // processors answer forced interrupts at once
  int            n_int [N];
  int_kind_e     got_kind;
  logic [15:0]   got_pc, got_areg;
  always @(negedge clk) begin
    int_ack <= '0;
    for (int j = 0; j < N; j++)
      if (int_req[j] && !int_ack[j]) begin
        int_ack[j] <= 1'b1;
        n_int[j]++;
        got_kind = int_kind;
        got_pc   = int_pc;
        got_areg = int_areg;
      end
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic setreg(input int j, input int sel, input logic [15:0] v);
    @(negedge clk);
    rel_we[j] = 1; rel_sel[j] = 2'(sel); rel_wdata[j] = v;
    @(negedge clk);
    rel_we[j] = 0;
  endtask

  task automatic ref_mem(input int j, input logic we, input logic [15:0] la, input logic priv,
                         input logic [DW-1:0] wd, output logic [DW-1:0] rd, output logic flt);
    int t = 0;
    @(negedge clk);
    p_req[j] = 1; p_we[j] = we; p_la[j] = la; p_priv[j] = priv; p_wdata[j] = wd;
    @(negedge clk);
    p_req[j] = 0;
    while (!p_done[j] && t < 1000) begin
      @(negedge clk);
      t++;
    end
    rd  = p_rdata[j];
    flt = p_fault[j];
  endtask

  // a PI call: absolute, privileged write of the call word to mailbox I+j
  task automatic pi_call(input int j, input pi_op_e op, input int lvl, input int pr,
                         input logic [15:0] operand, input pi_status_e exp, input string what);
    logic [DW-1:0] rd;
    logic flt;
    int t = 0;
    setreg(j, 3, 16'(RELOC_ABSOLUTE));
    fork
      ref_mem(j, 1, PI_MOD + 16'(I + j), 1, {op, 4'(lvl), 8'(pr), operand}, rd, flt);
      begin
        while (!pi_done[j] && t < 5000) begin
          @(posedge clk);
          t++;
        end
        chk(32'(pi_status), 32'(exp), what);
      end
    join
    @(negedge clk);
  endtask

  // random traffic of processor j in its two-segment space
  task automatic traffic(input int j, input int count);
    logic [DW-1:0] model [64];
    bit            known [64];
    logic [DW-1:0] rd, wd;
    logic          flt;
    logic [15:0]   la;
    for (int w = 0; w < 64; w++) known[w] = 0;
    setreg(j, 0, 16'(j) << AW);                               // own module
    setreg(j, 1, 16'd16);
    setreg(j, 2, (16'(N + j % (N - 1)) << AW) + 16'(j * 64)); // a shared module
    setreg(j, 3, 16'(RELOC_TWO_SEG));
    for (int c = 0; c < count; c++) begin
      la = 16'($urandom % 64);
      if (!known[la] || ($urandom % 2 == 0)) begin
        wd = $urandom;
        ref_mem(j, 1, la, 0, wd, rd, flt);
        model[la] = wd;
        known[la] = 1;
      end else begin
        ref_mem(j, 0, la, 0, '0, rd, flt);
        chk(rd, model[la], $sformatf("P%0d read la %0d", j, la));
      end
      chk(flt, 0, "no fault in two-segment space");
    end
  endtask

  // the IOP reads and writes its own area of module M_4 over the bus
  task automatic iop_traffic(input int count);
    logic [DW-1:0] model [16];
    for (int c = 0; c < count; c++) begin
      logic [15:0] a;
      logic we;
      a  = (16'(N) << AW) + 16'd900 + 16'(c % 16);
      we = (c < 16) || ($urandom % 2 == 0);
      @(negedge clk);
      iop_req = '{en: 1, we: we, addr: a, wdata: $urandom};
      if (we) model[c % 16] = iop_req.wdata;
      #1;
      while (!iop_gnt) begin @(negedge clk); #1; end
      @(negedge clk);
      iop_req.en = 0;
      if (!we) chk(iop_rdata, model[c % 16], "IOP read");
      n_iop++;
    end
  endtask

  initial begin
    logic [DW-1:0] rd;
    logic flt;
    iop_req = '0;
    for (int j = 0; j < N; j++) begin
      p_req[j] = 0; p_we[j] = 0; p_la[j] = '0; p_priv[j] = 0; p_wdata[j] = '0;
      rel_we[j] = 0; rel_sel[j] = '0; rel_wdata[j] = '0;
      proc_areg[j] = 16'hA000 + 16'(j);
      proc_pc[j] = 16'h0100 * 16'(j + 1);
      n_int[j] = 0;
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (pi_ready);

    // all processors and the IOP at once
    fork
      traffic(0, 120);
      traffic(1, 120);
      traffic(2, 120);
      traffic(3, 120);
      iop_traffic(60);
    join

    // bound fault in a one-segment space
    setreg(0, 0, 16'd0); setreg(0, 1, 16'd100); setreg(0, 3, 16'(RELOC_ONE_SEG));
    ref_mem(0, 0, 16'd99, 0, '0, rd, flt);  chk(flt, 0, "inside the bound");
    ref_mem(0, 0, 16'd100, 0, '0, rd, flt); chk(flt, 1, "outside the bound");
    if (flt) n_fault++;
    // an unprivileged absolute reference is refused
    setreg(1, 3, 16'(RELOC_ABSOLUTE));
    ref_mem(1, 0, PI_MOD + 16'(L), 0, '0, rd, flt); chk(flt, 1, "absolute needs privilege");
    if (flt) n_fault++;
    // data shared through module M_6
    setreg(2, 3, 16'(RELOC_ABSOLUTE));
    ref_mem(2, 1, (16'd6 << AW) + 16'd5, 1, 32'hFEED_0002, rd, flt);
    ref_mem(3, 1, (16'd6 << AW) + 16'd6, 1, 32'hFEED_0003, rd, flt);
    setreg(3, 3, 16'(RELOC_ABSOLUTE));
    ref_mem(3, 0, (16'd6 << AW) + 16'd5, 1, '0, rd, flt);
    chk(rd, 32'hFEED_0002, "P3 reads what P2 wrote");
    if (rd == 32'hFEED_0002) n_shared++;
    n_abs++;

    // process communication
    pi_call(0, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "schedule (0,0)");
    fork  // three processors call the PI together
      pi_call(0, OP_LOAD_ID, 0, 1, 16'hC, ST_OK, "ID (0,1) := 1100");
      pi_call(1, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "schedule (0,1)");
      pi_call(2, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "schedule (0,2)");
    join
    pi_call(1, OP_LOAD_INT, 0, 0, 16'h0200, ST_OK, "INT of (0,1)");
    pi_call(1, OP_SET_ACCEPT, 0, 0, 16'h3, ST_OK, "open PA CA of (0,1)");
    pi_call(0, OP_LOAD_S, 0, 0, 16'hC, ST_OK, "S of (0,0) := 1100");
    pi_call(0, OP_SIGNAL, 0, 0, 16'h0, ST_DELIVERED, "signal delivered");
    chk(n_int[1], 1, "P1 interrupted");
    chk(got_pc, 16'h0200, "P1 starts at INT");
    chk(got_areg, 16'hA000, "A-register passed");
    // the saved PC is in M_7 at K+1
    ref_mem(2, 0, PI_MOD + 16'(K + 1), 1, '0, rd, flt);
    chk(rd, 32'h0200, "PC of P1 saved at K+1");
    proc_areg[0] = 16'h5151;
    pi_call(0, OP_SIGNAL, 0, 0, 16'h0, ST_QUEUED, "second signal queued");
    pi_call(1, OP_SET_ACCEPT, 0, 0, 16'h3, ST_DELIVERED, "queued signal delivered");
    chk(n_int[1], 2, "P1 interrupted again");
    chk(got_areg, 16'h5151, "queued A-register passed");
    pi_call(1, OP_LOAD_S, 0, 0, 16'hF, ST_OK, "S of (0,1) := 1111");
    pi_call(1, OP_PREEMPT, 0, 0, 16'h0, ST_DENIED, "preempt of the supervisor refused");
    // (0,0) preempts (0,1) once it opens PA
    pi_call(1, OP_SET_ACCEPT, 0, 0, 16'h2, ST_OK, "open PA of (0,1)");
    proc_pc[1] = 16'h0444;
    pi_call(0, OP_PREEMPT, 0, 0, 16'h0333, ST_DELIVERED, "preempt delivered");
    chk(n_int[1], 3, "P1 preempted");
    chk(32'(got_kind), 32'(INT_PREEMPT), "interrupt kind");
    chk(got_pc, 16'h0333, "P1 starts at the preempt address");
    ref_mem(2, 0, PI_MOD + 16'(J + 1), 1, '0, rd, flt);
    chk(rd, 32'h0444, "PC of P1 saved at J+1");
    // rescheduling restores the process's registers
    pi_call(1, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "reschedule (0,1)");
    chk(32'(pi_sched_id), 32'hC, "restored ID");
    chk(32'(pi_sched_s), 32'hF, "restored S");
    chk(32'(pi_sched_int), 32'h0200, "restored INT");

    // every mechanism must have happened
    checks++;
    if (n_private == 0 || n_bus == 0 || n_contend == 0 || n_fault < 2 || n_abs == 0 ||
        n_shared == 0 || n_deliv < 3 || n_queue == 0 || n_deq == 0 || n_refuse == 0 ||
        n_pi_together == 0 || n_iop == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("private %0d bus %0d contention %0d faults %0d shared %0d iop %0d",
             n_private, n_bus, n_contend, n_fault, n_shared, n_iop);
    $display("PI: delivered %0d queued %0d dequeued %0d refused %0d simultaneous calls %0d",
             n_deliv, n_queue, n_deq, n_refuse, n_pi_together);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
