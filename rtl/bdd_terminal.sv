// bdd_terminal: one terminal (leaf) of a polymorphic binary decision diagram.
//
// A leaf of the diagram is reached once inputs i(n-1)..i1 are fixed, so its
// value is a function of i0 alone in each mode: constant 0, constant 1,
// identity or negation. CODE packs the required values as
// CODE = 8*s21 + 4*s20 + 2*s11 + s10 (s1x: mode-1 value for i0 = x, s2x:
// mode-2 value), sixteen terminals in all.
//
// Three terminals have published gate-level forms, used as given:
//   CODE 8  (0/id):   NAND/NOR(i0, 0) followed by an inverter.
//   CODE 6  (id/neg): NAND/NOR(i0, ~i0) is 1 in mode 1 and 0 in mode 2; XOR
//                     with ~i0 then gives i0 in mode 1 and ~i0 in mode 2.
//   CODE 11 (1/id):   NAND/NOR(~i0, 0).
// The remaining codes are this design's own: when both modes want the same
// function, ordinary gates (or a constant) suffice; otherwise the mode-1 and
// mode-2 values of i0 are formed with inverters and joined by a pmux. The
// ordinary terminals behave the same in both modes and leave `mode` unused.
// The XOR of terminal 6 is the only 2-input gate that gives that terminal's
// function. Combinational.
module bdd_terminal
  import poly_pkg::*;
#(
  parameter logic [3:0] CODE = 4'd8
) (
  input  poly_mode_e mode,
  input  logic       i0,
  output logic       y
);

  // Value of the terminal for one mode, from its two code bits {s_x1, s_x0}.
  function automatic logic term_fn(logic [1:0] s, logic v);
    case (s)
      2'b00:   return 1'b0;
      2'b11:   return 1'b1;
      2'b10:   return v;
      default: return ~v;
    endcase
  endfunction

  localparam logic [1:0] S1 = CODE[1:0];
  localparam logic [1:0] S2 = CODE[3:2];

  if (CODE == 4'd8) begin : g_zero_id
    logic p;
    nand_nor_gate u_g (.mode(mode), .a(i0), .b(1'b0), .y(p));
    assign y = ~p;
  end else if (CODE == 4'd6) begin : g_id_neg
    logic i0_n, p;
    assign i0_n = ~i0;
    nand_nor_gate u_g (.mode(mode), .a(i0), .b(i0_n), .y(p));
    assign y = p ^ i0_n;
  end else if (CODE == 4'd11) begin : g_one_id
    logic i0_n;
    assign i0_n = ~i0;
    nand_nor_gate u_g (.mode(mode), .a(i0_n), .b(1'b0), .y(y));
  end else if (S1 == S2) begin : g_ordinary
    assign y = term_fn(S1, i0);
  end else begin : g_pmux
    logic v1, v2;
    assign v1 = term_fn(S1, i0);
    assign v2 = term_fn(S2, i0);
    pmux u_pmux (.mode(mode), .a(v1), .b(v2), .y(y));
  end

endmodule
