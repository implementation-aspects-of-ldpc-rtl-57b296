// ps_multiplier: partial syndrome multiplier of the partial syndrome former
// encoder. For the code block v that has just been produced it forms the
// products v * H_i^T for i = 1 .. MS, one bit per delay i because the code
// has c - b = 1 check per time unit. Bit i of `prod` is added into stage
// p_{.,i} of the partial syndrome shift register.
//
// Only J - 1 = 2 products per symbol are non-zero (the symbol's later check
// nodes), so after constant propagation each output bit is either 0, one
// input bit or the XOR of the two input bits. The code offsets come from
// ldpccc_pkg::sym_delay (the code is time invariant, so H_i^T(t) does not
// depend on t). Purely combinational.
module ps_multiplier
  import ldpccc_pkg::*;
#(
  parameter int unsigned MS = 2048   // syndrome former memory m_s
) (
  input  logic [C-1:0]  v,      // v[j] = code bit v^(j+1)
  output logic [MS:1]   prod    // prod[i] = v * H_i^T, i = 1..MS
);

  for (genvar i = 1; i <= MS; i++) begin : g_stage
    logic [C-1:0] hit;   // symbol j has a check node i time units later
    for (genvar j = 0; j < C; j++) begin : g_sym
      localparam bit HIT = (sym_delay(MS, j, 1) == i) || (sym_delay(MS, j, 2) == i);
      assign hit[j] = HIT;
    end
    assign prod[i] = ^(v & hit);
  end

endmodule
