// id_rights_tb: checks the rights relations of id_rights.
//
// Exhaustive over all pairs of 4-bit IDs, against a bit-by-bit reference,
// then the worked example of four processes with IDs 1111, 1100, 0011 and
// 0001, whose relations are stated by hand.
module id_rights_tb;
  localparam int H = 4;
  logic [H-1:0] a, b, n;
  logic coop, apb, bpa, legal;
  int checks = 0, failures = 0;

  id_rights #(.H(H)) dut (.id_a(a), .id_b(b), .id_new(n), .cooperate(coop),
                          .a_priv_b(apb), .b_priv_a(bpa), .new_legal(legal));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b n=%b got %b exp %b", what, a, b, n, got, exp);
    end
  endtask

  // Relation between two named IDs, by hand.
  task automatic pair(input logic [H-1:0] x, input logic [H-1:0] y,
                      input logic exp_coop, input logic exp_xpy);
    a = x; b = y; n = '0;
    #1;
    chk(coop, exp_coop, "example cooperate");
    chk(apb, exp_xpy, "example privilege");
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int z = 0; z < 16; z += 5) begin
          bit any_common, all_in, all_in_rev, new_in;
          a = x[H-1:0]; b = y[H-1:0]; n = z[H-1:0];
          any_common = 0; all_in = 1; all_in_rev = 1; new_in = 1;
          for (int k = 0; k < H; k++) begin
            if (a[k] && b[k]) any_common = 1;
            if (b[k] && !a[k]) all_in = 0;
            if (a[k] && !b[k]) all_in_rev = 0;
            if (n[k] && !a[k]) new_in = 0;
          end
          #1;
          chk(coop, any_common, "cooperate");
          chk(apb, any_common && all_in, "a over b");
          chk(bpa, any_common && all_in_rev, "b over a");
          chk(legal, new_in, "legal new ID");
        end
    // worked example: (0,0)=1111 (0,1)=1100 (1,0)=0011 (0,2)=0001
    pair(4'b1111, 4'b1100, 1, 1);
    pair(4'b1111, 4'b0011, 1, 1);
    pair(4'b1111, 4'b0001, 1, 1);
    pair(4'b1100, 4'b0011, 0, 0);
    pair(4'b1100, 4'b0001, 0, 0);
    pair(4'b0011, 4'b0001, 1, 1);
    pair(4'b0001, 4'b0011, 1, 0);
    pair(4'b1100, 4'b1111, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
