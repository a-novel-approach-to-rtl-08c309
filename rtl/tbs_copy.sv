// tbs_copy: Feynman-gate copy network of the ternary barrel shifter.
//
// Reversible circuits may not fan a wire out, so every data trit is copied
// with a chain of 2^K - 1 ternary Feynman gates whose target inputs are the
// constant 0: each gate hands its control output on to the next gate and
// drops a copy on its target output, and the last gate of the chain gives
// both of its outputs, so the chain yields 2^K copies. A further N*(K-1)
// Feynman gates with both inputs at 0 generate 2*N*(K-1) constant zeros for
// the reference inputs of the first MFG level.
//
// copies[p][c] is copy c of data[p]; copies 0 .. 2^K-2 come from the target
// outputs along the chain and copy 2^K-1 from the last control output.
// Purely combinational. The chain structure and the gate counts follow the
// design; the numbering of the copies is this implementation's choice.
module tbs_copy
  import tbs_pkg::*;
#(
  parameter int unsigned N = 4,                 // data trits
  parameter int unsigned K = 2,                 // shift-control trits (>= 2)
  localparam int unsigned W = 1 << K,
  localparam int unsigned NZ = 2 * N * (K - 1)
) (
  input  trit_t data   [N],
  output trit_t copies [N][W],
  output trit_t zeros  [NZ]
);

  for (genvar p = 0; p < N; p++) begin : g_chain
    trit_t ctl [W];  // control line entering gate j (ctl[0] = data)
    assign ctl[0] = data[p];
    for (genvar j = 0; j < W - 1; j++) begin : g_fe
      tfg u_fe (.a(ctl[j]), .b(T0), .p(ctl[j+1]), .q(copies[p][j]));
    end
    assign copies[p][W-1] = ctl[W-1];
  end

  for (genvar z = 0; z < N * (K - 1); z++) begin : g_zero
    tfg u_zfe (.a(T0), .b(T0), .p(zeros[2*z]), .q(zeros[2*z+1]));
  end

endmodule
