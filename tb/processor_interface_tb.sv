// processor_interface_tb: drives the Processor Interface through calls from
// four processors and checks every status, forced interrupt, saved PC and
// descriptor word against values worked out by hand.
//
// The PI owns a 256-word module; the testbench writes call words into the
// mailboxes over the module's other port (which the PI watches) and plays
// the processors' side of the interrupt handshake. Queue space is cut to
// four entries so that a full queue can be reached. Address map with these
// parameters: queue 0..7, descriptors L=8, K=72, J=76, mailboxes I=80.
module processor_interface_tb;
  import mp_pkg::*;
  localparam int N = 4, M = 4, H = 4, QENT = 4, AW = 8;
  localparam int L = 8, K = 72, J = 76, I = 80;

  logic clk = 0, rst_n = 1;
  logic ready;
  mem_req_t pi_req, tb_req;
  logic [DW-1:0] pi_rdata, tb_rdata;
  logic [ADDRW-1:0] proc_areg [N];
  logic [ADDRW-1:0] proc_pc [N];
  logic [N-1:0] int_req, int_ack, done;
  int_kind_e int_kind;
  logic [ADDRW-1:0] int_pc, int_areg;
  pi_status_e done_status;
  logic [DW-1:0] done_data;
  logic [H-1:0] sched_id, sched_s;
  logic [ADDRW-1:0] sched_int;
  logic ev_delivered, ev_queued, ev_dequeued, ev_refused;
  int checks = 0, failures = 0;

  processor_interface #(.N(N), .M(M), .H(H), .QENT(QENT), .AW(AW)) dut (
    .clk, .rst_n, .ready, .mem_req(pi_req), .mem_rdata(pi_rdata), .snoop_req(tb_req),
    .proc_areg, .proc_pc, .int_req, .int_kind, .int_pc, .int_areg, .int_ack,
    .done, .done_status, .done_data, .sched_id, .sched_s, .sched_int,
    .ev_delivered, .ev_queued, .ev_dequeued, .ev_refused);

  mem_module #(.AW(AW)) u_mem (.clk, .a_req(pi_req), .a_rdata(pi_rdata),
                               .b_req(tb_req), .b_rdata(tb_rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- processors' side of forced interrupts
  int            n_int = 0;
  int            int_proc;
  int_kind_e     got_kind;
  logic [15:0]   got_pc, got_areg;
  always @(negedge clk) begin
    int_ack <= '0;
    for (int j = 0; j < N; j++)
      if (int_req[j] && !int_ack[j]) begin
        int_ack[j] <= 1'b1;
        int_proc = j;
        got_kind = int_kind;
        got_pc   = int_pc;
        got_areg = int_areg;
        n_int++;
      end
  end

  int n_deliv = 0, n_queue = 0, n_deq = 0, n_ref = 0;
  always @(posedge clk) begin
    if (ev_delivered) n_deliv++;
    if (ev_queued)    n_queue++;
    if (ev_dequeued)  n_deq++;
    if (ev_refused)   n_ref++;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic mem_write(input int a, input logic [DW-1:0] d);
    @(negedge clk);
    tb_req = '{en: 1, we: 1, addr: 16'(a), wdata: d};
    @(negedge clk);
    tb_req = '0;
  endtask

  task automatic mem_read(input int a, output logic [DW-1:0] d);
    @(negedge clk);
    tb_req = '{en: 1, we: 0, addr: 16'(a), wdata: '0};
    @(negedge clk);
    tb_req = '0;
    d = tb_rdata;
  endtask

  // Processor j issues a PI call and waits for instruction complete.
  task automatic call(input int j, input pi_op_e op, input int lvl, input int pr,
                      input logic [15:0] operand, input pi_status_e exp, input string what);
    int t = 0;
    mem_write(I + j, {op, 4'(lvl), 8'(pr), operand});
    while (!done[j]) begin
      @(posedge clk);
      t++;
      if (t > 2000) break;
    end
    chk(32'(done_status), 32'(exp), what);
    @(negedge clk);
  endtask

  task automatic expect_int(input int n_before, input int j, input int_kind_e kind,
                            input logic [15:0] pc, input logic [15:0] areg, input string what);
    chk(n_int - n_before, 1, {what, ": one interrupt"});
    chk(int_proc, j, {what, ": interrupted processor"});
    chk(32'(got_kind), 32'(kind), {what, ": kind"});
    chk(32'(got_pc), 32'(pc), {what, ": new PC"});
    chk(32'(got_areg), 32'(areg), {what, ": A-register"});
  endtask

  task automatic desc(input int i, input int j, input int w, input logic [31:0] exp,
                      input string what);
    logic [DW-1:0] d;
    mem_read(L + 4 * (i * N + j) + w, d);
    chk(d, exp, what);
  endtask

  initial begin
    logic [DW-1:0] d;
    int n0;
    tb_req = '0;
    for (int j = 0; j < N; j++) begin
      proc_areg[j] = 16'hA000 + 16'(j);
      proc_pc[j]   = 16'h0700 + 16'(j);
    end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (ready);
    @(negedge clk);
    desc(0, 0, 0, 32'hF, "supervisor ID after init");
    desc(1, 1, 0, 32'h0, "empty slot after init");

    // caller with no scheduled process
    call(3, OP_LOAD_S, 0, 0, 16'h1, ST_BADCALL, "call with nothing running");

    // supervisor (0,0) on P0 builds the example: (0,1)=1100 (1,0)=0011 (0,2)=0001
    call(0, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "schedule (0,0)");
    call(0, OP_LOAD_ID, 0, 1, 16'hC, ST_OK, "load ID (0,1)");
    call(0, OP_LOAD_ID, 1, 0, 16'h3, ST_OK, "load ID (1,0)");
    call(0, OP_LOAD_ID, 0, 2, 16'h1, ST_OK, "load ID (0,2)");
    call(0, OP_LOAD_ID, 1, 1, 16'hC, ST_DENIED, "duplicate ID refused");
    desc(0, 1, 0, 32'hC, "ID (0,1)");
    desc(1, 0, 0, 32'h3, "ID (1,0)");
    desc(1, 1, 0, 32'h0, "ID (1,1) unchanged");
    call(1, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "schedule (0,1)");
    call(2, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "schedule (0,2)");
    // (0,1)=1100 has no privilege over (0,2)=0001
    call(1, OP_LOAD_ID, 0, 2, 16'h0, ST_DENIED, "load ID without privilege");
    // (0,1) may not give bits it lacks
    call(1, OP_LOAD_ID, 1, 1, 16'h3, ST_DENIED, "load ID with foreign bits");
    call(2, OP_LOAD_INT, 0, 0, 16'h1234, ST_OK, "load INT (0,2)");
    call(2, OP_SET_ACCEPT, 0, 0, 16'h3, ST_OK, "open PA and CA of (0,2)");
    desc(0, 2, 2, 32'hC000_0000, "PA CA of (0,2)");
    desc(0, 2, 3, 32'h0000_1234, "INT of (0,2)");

    // signal from (0,0) to (0,2): delivered at once
    call(0, OP_LOAD_S, 0, 0, 16'h1, ST_OK, "S of (0,0) := 0001");
    n0 = n_int;
    call(0, OP_SIGNAL, 0, 0, 16'h0, ST_DELIVERED, "signal delivered");
    expect_int(n0, 2, INT_SIGNAL, 16'h1234, 16'hA000, "signal");
    mem_read(K + 2, d); chk(d, 32'h0702, "PC of P2 saved at K+2");
    desc(0, 2, 2, 32'h0, "PA CA of (0,2) cleared");
    desc(0, 0, 2, 32'h8000_0000, "PA of sender set");

    // (0,2) no longer accepts: signal and preempt are queued in order
    proc_areg[0] = 16'hB001;
    call(0, OP_SIGNAL, 0, 0, 16'h0, ST_QUEUED, "signal queued");
    proc_areg[0] = 16'hB002;
    call(0, OP_PREEMPT, 0, 0, 16'h0456, ST_QUEUED, "preempt queued");
    desc(0, 2, 2, 32'h0000_0002, "queue length 2");
    call(2, OP_READ_REG, 0, 0, 16'd2, ST_OK, "read own word 2");
    chk(done_data, 32'h0000_0002, "read register data");

    // PA only: the signal at the head needs CA too, nothing is delivered
    n0 = n_int;
    call(2, OP_SET_ACCEPT, 0, 0, 16'h2, ST_OK, "open PA only");
    chk(n_int - n0, 0, "no delivery without CA");
    // PA and CA: the signal is delivered from the queue
    n0 = n_int;
    proc_pc[2] = 16'h0800;
    call(2, OP_SET_ACCEPT, 0, 0, 16'h3, ST_DELIVERED, "queued signal delivered");
    expect_int(n0, 2, INT_SIGNAL, 16'h1234, 16'hB001, "dequeued signal");
    mem_read(K + 2, d); chk(d, 32'h0800, "PC saved at K+2 again");
    desc(0, 2, 2, 32'h0000_0001, "queue length 1");
    // the preempt is next
    n0 = n_int;
    proc_pc[2] = 16'h0900;
    call(2, OP_SET_ACCEPT, 0, 0, 16'h2, ST_DELIVERED, "queued preempt delivered");
    expect_int(n0, 2, INT_PREEMPT, 16'h0456, 16'hB002, "dequeued preempt");
    mem_read(J + 2, d); chk(d, 32'h0900, "PC saved at J+2");
    desc(0, 2, 2, 32'h0, "queue empty, PA cleared");
    // running with PA open but CA closed: a signal must wait, a preempt need not
    call(2, OP_SET_ACCEPT, 0, 0, 16'h2, ST_OK, "open PA only, queue empty");
    n0 = n_int;
    call(0, OP_SIGNAL, 0, 0, 16'h0, ST_QUEUED, "signal waits for CA");
    chk(n_int - n0, 0, "no interrupt while CA closed");
    call(2, OP_SET_ACCEPT, 0, 0, 16'h3, ST_DELIVERED, "CA opened: delivered");
    chk(n_int - n0, 1, "one interrupt after CA opened");
    desc(0, 2, 2, 32'h0, "queue empty again");

    // refusals
    call(1, OP_LOAD_S, 0, 0, 16'h3, ST_OK, "S of (0,1) := 0011");
    call(1, OP_SIGNAL, 0, 0, 16'h0, ST_DENIED, "no common bit: signal refused");
    call(1, OP_LOAD_S, 0, 0, 16'hF, ST_OK, "S of (0,1) := 1111");
    call(1, OP_PREEMPT, 0, 0, 16'h0, ST_DENIED, "preempt of a superior refused");
    call(1, OP_LOAD_S, 0, 0, 16'h6, ST_OK, "S of (0,1) := 0110");
    call(1, OP_SIGNAL, 0, 0, 16'h0, ST_NOTFOUND, "no process with that ID");

    // preempt delivered at once: (0,0) preempts (0,1) after it opens PA
    call(1, OP_SET_ACCEPT, 0, 0, 16'h2, ST_OK, "open PA of (0,1)");
    call(0, OP_LOAD_S, 0, 0, 16'hC, ST_OK, "S of (0,0) := 1100");
    n0 = n_int;
    proc_areg[0] = 16'hC0DE;
    call(0, OP_PREEMPT, 0, 0, 16'h0321, ST_DELIVERED, "preempt delivered");
    expect_int(n0, 1, INT_PREEMPT, 16'h0321, 16'hC0DE, "preempt");
    mem_read(J + 1, d); chk(d, 32'h0701, "PC of P1 saved at J+1");

    // a message to a process that is not running: queued until scheduled
    call(2, OP_LOAD_S, 0, 0, 16'h3, ST_OK, "S of (0,2) := 0011");
    proc_areg[2] = 16'hD00D;
    call(2, OP_SIGNAL, 0, 0, 16'h0, ST_QUEUED, "signal to (1,0), not running");
    call(0, OP_SCHEDULE, 0, 0, 16'd1, ST_OK, "schedule (1,0): PA closed, stays queued");
    call(0, OP_LOAD_INT, 0, 0, 16'h0ABC, ST_OK, "INT of (1,0)");
    n0 = n_int;
    proc_pc[0] = 16'h0555;
    call(0, OP_SET_ACCEPT, 0, 0, 16'h3, ST_DELIVERED, "(1,0) opens: delivered");
    expect_int(n0, 0, INT_SIGNAL, 16'h0ABC, 16'hD00D, "signal to (1,0)");
    call(0, OP_SCHEDULE, 0, 0, 16'd9, ST_BADCALL, "schedule of a level that does not exist");

    // fill the four-entry queue of (0,2) (PA closed) from (1,0)=0011
    call(0, OP_LOAD_S, 0, 0, 16'h1, ST_OK, "S of (1,0) := 0001");
    for (int q = 0; q < 4; q++)
      call(0, OP_SIGNAL, 0, 0, 16'h0, ST_QUEUED, "signal queued into (0,2)");
    call(0, OP_SIGNAL, 0, 0, 16'h0, ST_QFULL, "fifth message: queue full");
    desc(0, 2, 2, 32'h0000_0004, "queue length 4");
    // drain one, the freed entry is reused
    call(2, OP_SET_ACCEPT, 0, 0, 16'h3, ST_DELIVERED, "drain one");
    call(0, OP_SIGNAL, 0, 0, 16'h0, ST_QUEUED, "freed entry reused");
    desc(0, 2, 2, 32'h0000_0004, "queue length 4 again");
    // rescheduling (0,2) hands back its registers; its flags are closed
    call(2, OP_SCHEDULE, 0, 0, 16'd0, ST_OK, "reschedule (0,2)");
    chk(32'(sched_id), 32'h1, "restored ID");
    chk(32'(sched_s), 32'h3, "restored S");
    chk(32'(sched_int), 32'h1234, "restored INT");

    chk(n_deliv, n_int, "delivery events match interrupts");
    checks++;
    if (n_deliv == 0 || n_queue == 0 || n_deq == 0 || n_ref == 0) begin
      failures++;
      $display("FAIL mechanism not seen: deliver %0d queue %0d dequeue %0d refuse %0d",
               n_deliv, n_queue, n_deq, n_ref);
    end
    $display("delivered %0d queued %0d dequeued %0d refused %0d", n_deliv, n_queue, n_deq, n_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
