// reloc_unit_tb: random references in each relocation mode against a
// reference computation, checking the two-cycle latency of every result.
module reloc_unit_tb;
  import mp_pkg::*;
  logic clk = 0, rst_n = 1;
  logic reg_we, in_valid, priv, out_valid, fault;
  logic [1:0] reg_sel;
  logic [ADDRW-1:0] reg_wdata, la, pa;
  int checks = 0, failures = 0;

  reloc_unit dut (.clk, .rst_n, .reg_we, .reg_sel, .reg_wdata, .in_valid, .la, .priv,
                  .out_valid, .pa, .fault);

  always #5 clk = ~clk;

  // expected results, indexed by issue cycle
  logic [ADDRW-1:0] exp_pa [$];
  logic             exp_f  [$];
  logic             exp_v  [$];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic setreg(input int sel, input logic [ADDRW-1:0] v);
    @(negedge clk);
    reg_we = 1; reg_sel = 2'(sel); reg_wdata = v; in_valid = 0;
    @(negedge clk);
    reg_we = 0;
  endtask

  initial begin
    logic [ADDRW-1:0] b1, l1, b2;
    int mode;
    reg_we = 0; in_valid = 0; priv = 0; la = '0; reg_sel = '0; reg_wdata = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 30; round++) begin
      mode = round % 3;
      b1 = 16'($urandom); l1 = 16'($urandom % 4096); b2 = 16'($urandom);
      setreg(0, b1); setreg(1, l1); setreg(2, b2); setreg(3, 16'(mode));
      exp_pa.delete(); exp_f.delete(); exp_v.delete();
      for (int c = 0; c < 60; c++) begin
        @(negedge clk);
        // compare the output issued two cycles ago
        if (exp_v.size() == 2) begin
          checks++;
          if (out_valid !== exp_v[0] || (exp_v[0] && (fault !== exp_f[0] ||
              (!exp_f[0] && pa !== exp_pa[0])))) begin
            failures++;
            $display("FAIL mode %0d: valid %b/%b fault %b/%b pa %h/%h", mode,
                     out_valid, exp_v[0], fault, exp_f[0], pa, exp_pa[0]);
          end
          void'(exp_v.pop_front()); void'(exp_f.pop_front()); void'(exp_pa.pop_front());
        end
        in_valid = (c < 56) ? 1'($urandom) : 1'b0;
        la = (($urandom % 2) != 0) ? 16'($urandom % (int'(l1) + 64)) : 16'($urandom);
        priv = 1'($urandom);
        exp_v.push_back(in_valid);
        case (mode)
          0: begin exp_f.push_back(la >= l1); exp_pa.push_back(b1 + la); end
          1: begin
            exp_f.push_back(1'b0);
            exp_pa.push_back(la < l1 ? b1 + la : b2 + (la - l1));
          end
          default: begin exp_f.push_back(!priv); exp_pa.push_back(la); end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
