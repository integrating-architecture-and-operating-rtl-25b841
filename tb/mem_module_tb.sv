// mem_module_tb: random traffic on both ports of a 16-word module against a
// reference array: one-cycle read latency, old data on read-during-write,
// private port winning a same-word write collision.
module mem_module_tb;
  import mp_pkg::*;
  localparam int AW = 4;
  logic clk = 0;
  mem_req_t a, b;
  logic [DW-1:0] ar, br;
  logic [DW-1:0] ref_mem [16];
  int checks = 0, failures = 0;

  mem_module #(.AW(AW)) dut (.clk, .a_req(a), .a_rdata(ar), .b_req(b), .b_rdata(br));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_a, exp_b;
    bit rd_a, rd_b;
    for (int w = 0; w < 16; w++) ref_mem[w] = '0;
    a = '0; b = '0;
    @(negedge clk);
    // initial contents are zero
    for (int w = 0; w < 16; w++) begin
      a = '{en: 1, we: 0, addr: 16'(w), wdata: '0};
      @(negedge clk);
      checks++;
      if (ar !== '0) begin failures++; $display("FAIL init word %0d", w); end
    end
    for (int c = 0; c < 2000; c++) begin
      a = '{en: 1'($urandom), we: 1'($urandom), addr: 16'($urandom % 16), wdata: $urandom};
      b = '{en: 1'($urandom), we: 1'($urandom), addr: 16'($urandom % 16), wdata: $urandom};
      if (c % 7 == 0) b.addr = a.addr;
      rd_a = a.en && !a.we; rd_b = b.en && !b.we;
      exp_a = ref_mem[a.addr[3:0]];
      exp_b = ref_mem[b.addr[3:0]];
      if (b.en && b.we) ref_mem[b.addr[3:0]] = b.wdata;
      if (a.en && a.we) ref_mem[a.addr[3:0]] = a.wdata;
      @(negedge clk);
      if (rd_a) begin
        checks++;
        if (ar !== exp_a) begin failures++; $display("FAIL port A read c=%0d", c); end
      end
      if (rd_b) begin
        checks++;
        if (br !== exp_b) begin failures++; $display("FAIL port B read c=%0d", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
