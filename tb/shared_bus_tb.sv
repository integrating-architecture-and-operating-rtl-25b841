// shared_bus_tb: three masters issue random reads and writes to four
// 16-word modules over the shared bus. Each master keeps one reference
// outstanding; read data is checked against a reference memory, grants
// are checked to go only to requesters, and contention is counted.
module shared_bus_tb;
  import mp_pkg::*;
  localparam int NM = 3, NS = 4, AW = 4;
  logic clk = 0, rst_n = 1;
  mem_req_t      m_req [NM];
  logic [NM-1:0] m_gnt, m_rvalid;
  logic [DW-1:0] m_rdata;
  mem_req_t      s_req [NS];
  logic [DW-1:0] s_rdata [NS];
  mem_req_t      zero_req;
  logic [DW-1:0] unused_a [NS];
  logic [DW-1:0] ref_mem [NS*16];
  int checks = 0, failures = 0, contention = 0;

  shared_bus #(.NM(NM), .NS(NS), .AW(AW)) dut (.clk, .rst_n, .m_req, .m_gnt, .m_rvalid,
                                               .m_rdata, .s_req, .s_rdata);
  for (genvar s = 0; s < NS; s++) begin : g_m
    mem_module #(.AW(AW)) u_m (.clk, .a_req(zero_req), .a_rdata(unused_a[s]),
                               .b_req(s_req[s]), .b_rdata(s_rdata[s]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per master: waiting for read data, expected value
  bit            wait_rd [NM];
  logic [DW-1:0] exp_rd  [NM];
  int            done_ops = 0;
  logic [NM-1:0] granted;

  initial begin
    zero_req = '0;
    for (int k = 0; k < NS*16; k++) ref_mem[k] = '0;
    for (int m = 0; m < NM; m++) begin m_req[m] = '0; wait_rd[m] = 0; end
    granted = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (done_ops < 1500) begin
      @(negedge clk);
      for (int m = 0; m < NM; m++) if (granted[m]) m_req[m].en = 0;
      // results of the previous cycle
      for (int m = 0; m < NM; m++) begin
        if (m_rvalid[m]) begin
          checks++;
          if (!wait_rd[m] || m_rdata !== exp_rd[m]) begin
            failures++;
            $display("FAIL read master %0d got %h exp %h", m, m_rdata, exp_rd[m]);
          end
          wait_rd[m] = 0;
          done_ops++;
        end
      end
      // new requests from idle masters
      for (int m = 0; m < NM; m++)
        if (!m_req[m].en && !wait_rd[m] && ($urandom % 3 != 0))
          m_req[m] = '{en: 1, we: 1'($urandom), addr: 16'($urandom % (NS*16)), wdata: $urandom};
      #1;
      if ($countones({m_req[0].en, m_req[1].en, m_req[2].en}) > 1) contention++;
      checks++;
      if ($countones(m_gnt) != ({m_req[0].en, m_req[1].en, m_req[2].en} != 0)) begin
        failures++;
        $display("FAIL grant %b", m_gnt);
      end
      // the granted reference is performed at the coming edge
      for (int m = 0; m < NM; m++)
        if (m_gnt[m]) begin
          if (m_req[m].we) begin
            ref_mem[m_req[m].addr[5:0]] = m_req[m].wdata;
            done_ops++;
          end else begin
            wait_rd[m] = 1;
            exp_rd[m] = ref_mem[m_req[m].addr[5:0]];
          end
        end
      granted = m_gnt;
    end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("contention cycles %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
