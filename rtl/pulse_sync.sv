// pulse_sync: brings an asynchronous input into the 40 MHz clock domain.
//
// Two flip-flops synchronise the input (`level`); a third detects its rising
// edge, giving a one-clock pulse per low-to-high transition (`rise`). Used
// for the discriminator outputs and the incoming local coincidence lines.
// Latency: the input reaches `level` and `rise` two clocks after it is
// sampled. The synchroniser depth is this design's choice.
module pulse_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic level,
  output logic rise
);
  logic [2:0] q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= {q[1:0], din};
  assign level = q[1];
  assign rise  = q[1] && !q[2];
endmodule
