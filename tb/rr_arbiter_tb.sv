// rr_arbiter_tb: random requests against a reference round-robin pointer;
// also checks that four always-requesting inputs are served 0,1,2,3,0,...
module rr_arbiter_tb;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] req, gnt;
  logic [1:0] gidx;
  logic any, adv;
  int checks = 0, failures = 0;
  int last;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance(adv), .gnt, .gnt_idx(gidx), .any_gnt(any));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    req = '0; adv = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    last = N - 1;
    // all requesting: strict rotation
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      req = '1; adv = 1;
      #1;
      checks++;
      if (!any || gidx != 2'((c) % N) || gnt != (4'b1 << (c % N))) begin
        failures++;
        $display("FAIL rotation c=%0d gidx=%0d gnt=%b", c, gidx, gnt);
      end
      last = gidx;
    end
    // random
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      req = N'($urandom);
      adv = $urandom % 2;
      #1;
      exp = -1;
      for (int o = 1; o <= N; o++)
        if (exp < 0 && req[(last + o) % N]) exp = (last + o) % N;
      checks++;
      if ((exp < 0 && (any || gnt != 0)) ||
          (exp >= 0 && (!any || int'(gidx) != exp || gnt != (4'b1 << exp)))) begin
        failures++;
        $display("FAIL random req=%b last=%0d exp=%0d got %0d", req, last, exp, gidx);
      end
      if (adv && exp >= 0) last = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
