// and_reduce_iter: masked AND reduction of a bit stream, one bit per cycle.
//
// Computes a D-share sharing of x(0) & x(1) & ... & x(n-1), for example the
// result of an equality test (x = NOT(v XOR v') bit by bit) that must not
// leak which bits differed. A single HPC4 AND gadget is closed on itself
// through a 2:1 mux: with sel_i = 1 the mux feeds the gadget the constant
// sharing of 1 (share 0 = 1, other shares 0), with sel_i = 0 it feeds back
// the gadget's own output (the accumulator). The other gadget input is the
// sharing of the incoming bit x(i).
//
// Timing: a bit presented with en_i high is absorbed at the next clock edge
// and acc_o then holds the conjunction of all bits since the last sel_i = 1
// cycle, that cycle's bit included (sel_i = 1 together with x(0), sel_i = 0
// for x(1), x(2), ...). Holding sel_i = 1 on every cycle turns the loop into
// a pipeline that just registers 1 & x(i). rnd_i carries 5*D*(D-1)/2 fresh
// random bits per cycle. The loop is single-cycle, which is safe here because
// the HPC4 gadget stays composable against transitions on its own output.
module and_reduce_iter #(
  parameter int unsigned D = 2
) (
  input  logic                     clk,
  input  logic                     en_i,
  input  logic                     sel_i,
  input  logic [D-1:0]             x_i,
  input  logic [5*D*(D-1)/2-1:0]   rnd_i,
  output logic [D-1:0]             acc_o
);

  logic [D-1:0] a;

  always_comb
    for (int s = 0; s < D; s++) a[s] = sel_i ? (s == 0) : acc_o[s];

  hpc4_and #(.D(D), .W(1)) u_and (
    .clk, .en({D{en_i}}), .x(a), .y(x_i), .r(rnd_i), .z(acc_o), .xy_q()
  );

endmodule
