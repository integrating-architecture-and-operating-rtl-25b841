// proc_mem_port_tb: processor 1's memory port with its own module on the
// private path and a behavioural shared bus that grants at random.
// Checks read data against a reference memory of all four modules, the
// route taken (private path for module 1, bus otherwise), the five-cycle
// request-to-done time of a private reference, and relocation faults.
module proc_mem_port_tb;
  import mp_pkg::*;
  localparam int J = 1, NS = 4, AW = 4;
  logic clk = 0, rst_n = 1;
  logic p_req, p_we, p_priv, p_busy, p_done, p_fault, rel_we;
  logic [ADDRW-1:0] p_la, rel_wdata;
  logic [1:0] rel_sel;
  logic [DW-1:0] p_wdata, p_rdata;
  mem_req_t priv_req, bus_req, zero_req;
  logic [DW-1:0] priv_rdata, unused_b;
  logic bus_gnt, bus_rvalid, used_private, used_bus;
  logic [DW-1:0] bus_rdata;
  logic [DW-1:0] ref_mem [NS*16];
  int checks = 0, failures = 0, n_priv = 0, n_bus = 0, n_fault = 0;

  proc_mem_port #(.J(J), .NS(NS), .AW(AW)) dut (
    .clk, .rst_n, .p_req, .p_la, .p_we, .p_wdata, .p_priv, .p_busy, .p_done, .p_rdata,
    .p_fault, .rel_we, .rel_sel, .rel_wdata, .priv_req, .priv_rdata, .bus_req, .bus_gnt,
    .bus_rvalid, .bus_rdata, .used_private, .used_bus);

  mem_module #(.AW(AW)) u_own (.clk, .a_req(priv_req), .a_rdata(priv_rdata),
                               .b_req(zero_req), .b_rdata(unused_b));

  always #5 clk = ~clk;

  // behavioural bus: random grant, read data one cycle after the grant
  bit rd_next;
  logic [DW-1:0] rd_val;
  always @(negedge clk) begin
    bus_rvalid <= rd_next;
    bus_rdata  <= rd_val;
    rd_next = 0;
    bus_gnt <= 0;
    if (bus_req.en && ($urandom % 3 == 0)) begin
      bus_gnt <= 1;
      if (bus_req.we) ref_mem[bus_req.addr[5:0]] = bus_req.wdata;
      else begin rd_next = 1; rd_val = ref_mem[bus_req.addr[5:0]]; end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic setreg(input int sel, input logic [ADDRW-1:0] v);
    @(negedge clk);
    rel_we = 1; rel_sel = 2'(sel); rel_wdata = v;
    @(negedge clk);
    rel_we = 0;
  endtask

  // one reference; exp_fault says whether relocation must refuse it
  task automatic access(input logic we, input logic [ADDRW-1:0] la, input logic priv,
                        input logic [ADDRW-1:0] exp_pa, input logic exp_fault);
    int cyc = 0;
    bit saw_priv = 0, saw_bus = 0;
    logic [DW-1:0] wd, exp_rd;
    wd = $urandom;
    @(negedge clk);
    p_req = 1; p_we = we; p_la = la; p_priv = priv; p_wdata = wd;
    exp_rd = ref_mem[exp_pa[5:0]];
    @(negedge clk);
    p_req = 0;
    cyc = 1;
    while (!p_done) begin
      if (used_private) saw_priv = 1;
      if (used_bus) saw_bus = 1;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (p_fault !== exp_fault) begin
      failures++; $display("FAIL fault la=%h got %b", la, p_fault);
    end
    if (exp_fault) begin n_fault++; return; end
    if (we && exp_pa[AW +: 2] == 2'(J)) ref_mem[exp_pa[5:0]] = wd;
    checks++;
    if (exp_pa[AW +: 2] == 2'(J)) begin
      n_priv++;
      if (!saw_priv || saw_bus || cyc != 5) begin
        failures++; $display("FAIL private route la=%h cyc=%0d", la, cyc);
      end
    end else begin
      n_bus++;
      if (saw_priv || !saw_bus) begin failures++; $display("FAIL bus route la=%h", la); end
    end
    if (!we) begin
      checks++;
      if (p_rdata !== exp_rd) begin
        failures++; $display("FAIL read la=%h pa=%h got %h exp %h", la, exp_pa, p_rdata, exp_rd);
      end
    end
  endtask

  initial begin
    logic [ADDRW-1:0] la;
    zero_req = '0;
    p_req = 0; p_we = 0; p_la = '0; p_priv = 0; p_wdata = '0;
    rel_we = 0; rel_sel = '0; rel_wdata = '0;
    for (int k = 0; k < NS*16; k++) ref_mem[k] = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // two segments: 8 words in own module 1, the rest from module 2 on
    setreg(0, 16'd16); setreg(1, 16'd8); setreg(2, 16'd32); setreg(3, 16'(RELOC_TWO_SEG));
    for (int c = 0; c < 300; c++) begin
      la = 16'($urandom % 32);
      access(1'($urandom), la, 0, la < 8 ? 16'd16 + la : 16'd32 + la - 16'd8, 0);
    end
    // one segment in module 1 with a bound of 12 words
    setreg(0, 16'd17); setreg(1, 16'd12); setreg(3, 16'(RELOC_ONE_SEG));
    for (int c = 0; c < 100; c++) begin
      la = 16'($urandom % 16);
      access(1'($urandom), la, 0, 16'd17 + la, la >= 12);
    end
    // absolute references: privileged only
    setreg(3, 16'(RELOC_ABSOLUTE));
    for (int c = 0; c < 100; c++) begin
      logic pv;
      la = 16'($urandom % 64);
      pv = 1'($urandom);
      access(1'($urandom), la, pv, la, !pv);
    end
    checks++;
    if (n_priv == 0 || n_bus == 0 || n_fault == 0) begin
      failures++; $display("FAIL coverage priv=%0d bus=%0d fault=%0d", n_priv, n_bus, n_fault);
    end
    $display("private %0d bus %0d fault %0d", n_priv, n_bus, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
