// EVG timestamp comparator.
//
// Compares the timestamp of the sequence RAM entry being served (A) with the
// timestamp counter (B).  match is the "GO" for the send control: the entry's
// event code is sent in the clock after A = B.  Combinational.
module evg_comparator #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         match
);

  assign match = (a == b);

endmodule
