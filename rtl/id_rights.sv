// id_rights: the rights relations between two processes' ID registers.
//
// Every process owns an H-bit ID register. Two processes may cooperatively
// communicate (signal each other) when their IDs share at least one set bit.
// Process a has privilege with respect to process b (may preempt b or change
// b's ID) when they cooperate and every bit set in b's ID is also set in a's.
// A new ID that a process a loads into any ID register may have only bits
// that are set in a's own ID. These three relations are the document's; the
// module is purely combinational and is used by the Processor Interface
// while it executes each instruction.
//
// Ports: id_a (acting process), id_b (other process), id_new (value a wants
// to load); outputs cooperate, a_priv_b, b_priv_a, new_legal.
module id_rights #(
  parameter int unsigned H = 4
) (
  input  logic [H-1:0] id_a,
  input  logic [H-1:0] id_b,
  input  logic [H-1:0] id_new,
  output logic         cooperate,
  output logic         a_priv_b,
  output logic         b_priv_a,
  output logic         new_legal
);

  always_comb begin
    cooperate = |(id_a & id_b);
    a_priv_b  = cooperate && ((id_b & ~id_a) == '0);
    b_priv_a  = cooperate && ((id_a & ~id_b) == '0);
    new_legal = (id_new & ~id_a) == '0;
  end

endmodule
