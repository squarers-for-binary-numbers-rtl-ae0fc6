// Array generator by diagonal for two's-complement operands whose sign bit
// has negative weight.
//
// The sign bit x_(N-1) has weight -2^(N-1), so the diagonal that belongs to
// it, x_(N-1)*x_k for k = 0 .. N-2, is negative. The negative terms are
// replaced by their complements plus a single 1 in the lowest column of
// that diagonal, which is exact modulo 2^(2N-1), the width of the square.
// This block is the diagonal generator plus a row of gates on its outputs:
// during the last step t_(N-1) (input `last`) every D term is inverted and
// the auxiliary output `aux` is 1; in every other step the outputs are
// those of the plain generator. The self term x_(N-1)*x_(N-1) stays
// positive and is passed unchanged. The complemented diagonal and the
// auxiliary 1 at t_(N-1) follow the paper; making the gates XORs controlled
// by the step signal is this design's choice.
module tc_diag_array_gen #(
    parameter int unsigned N = 5
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         start,
    input  logic         shift,
    input  logic         last,   // step t_(N-1): sign bit is in cell 0
    input  logic         x,
    output logic         xj,
    output logic [N-2:0] d,
    output logic         aux     // the auxiliary 1, weight of the lowest d
);
    logic [N-2:0] d_pos;

    diag_array_gen #(.N(N)) u_gen (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(shift), .x(x),
        .xj(xj), .d(d_pos)
    );

    assign d   = d_pos ^ {(N-1){last}};
    assign aux = last;
endmodule
