// One 4:2 compressor of a selectable structure. TYPE picks the plain exact
// compressor (DQ_EXACT, which ignores `exact`) or one of the dual-quality
// structures DQ1..DQ4, whose mode follows `exact` (1 = exact). Ports and
// timing are those of the selected compressor: combinational. This wrapper
// only lets the multiplier choose a structure per column by parameter.
module dq42_cell
  import dq_pkg::*;
#(
  parameter dq_type_e TYPE = DQ_C4
) (
  input  logic exact,
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  if (TYPE == DQ_C1) begin : g_c1
    dq42c1 u_c (.exact, .x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else if (TYPE == DQ_C2) begin : g_c2
    dq42c2 u_c (.exact, .x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else if (TYPE == DQ_C3) begin : g_c3
    dq42c3 u_c (.exact, .x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else if (TYPE == DQ_C4) begin : g_c4
    dq42c4 u_c (.exact, .x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else begin : g_exact
    logic unused_exact;
    assign unused_exact = exact;
    comp42_exact u_c (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end
endmodule
