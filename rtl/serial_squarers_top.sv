// Six bit-serial squarers side by side.
//
// Every squarer takes an N-bit operand least significant bit first, one bit
// per clock, starting with the clock edge that samples its `start_*` input
// together with x_0, and produces the bits of the square with the least delay
// the operand allows: y_0 and y_1 in the first step, then one more bit per
// step. They differ in how the squarer array is generated (by diagonal or by
// column), how it is summed (carry-propagate or carry-save), how the upper
// half of the square leaves the circuit (in parallel in the last input step,
// or serially in the steps after it) and which numbers they accept (unsigned
// or two's complement). The squarers share only the clock and reset; each
// has its own input pins and brings out its step index, its current pair of
// square bits and its complete square:
//   dcpa  diagonal generator, carry-propagate summer        N steps, 2N bits
//   dcsa  diagonal generator, carry-save summer              N steps, 2N bits
//   dser  carry-save summer, upper half serial          2N-1 steps, 2N bits
//   col   column generator, two square bits per step  (N-1)/2+N steps, 2N bits
//   text  two's complement by sign extension            2N-2 steps, 2N-1 bits
//   tneg  two's complement, negative-weight sign bit        N steps, 2N-1 bits
// See each squarer's module for its timing. The set of schemes is the
// paper's; placing them in one top with separate pins is this design's own.
module serial_squarers_top #(
    parameter int unsigned N = 5
) (
    input  logic clk,
    input  logic rst_n,
    // Figs. 3+4: unsigned, carry-propagate summer
    input  logic start_dcpa,
    input  logic x_dcpa,
    output logic [$clog2(N)-1:0] step_dcpa,
    output logic busy_dcpa,
    output logic y_valid_dcpa,
    output logic [1:0] y_pair_dcpa,
    output logic [2*N-1:0] square_dcpa,
    output logic square_valid_dcpa,
    // Figs. 3+5a: unsigned, carry-save summer, upper half in parallel
    input  logic start_dcsa,
    input  logic x_dcsa,
    output logic [$clog2(N)-1:0] step_dcsa,
    output logic busy_dcsa,
    output logic y_valid_dcsa,
    output logic [1:0] y_pair_dcsa,
    output logic [2*N-1:0] square_dcsa,
    output logic square_valid_dcsa,
    // Figs. 3+5c: unsigned, carry-save summer, upper half serial
    input  logic start_dser,
    input  logic x_dser,
    output logic [$clog2(2*N-1)-1:0] step_dser,
    output logic busy_dser,
    output logic y_valid_dser,
    output logic [1:0] y_pair_dser,
    output logic [2*N-1:0] square_dser,
    output logic square_valid_dser,
    // Fig. 6: unsigned, array by column
    input  logic start_col,
    input  logic x_col,
    output logic [$clog2((N-1)/2+N)-1:0] step_col,
    output logic busy_col,
    output logic y_valid_col,
    output logic [1:0] y_pair_col,
    output logic [2*N-1:0] square_col,
    output logic square_valid_col,
    // Figs. 7+8: two's complement by sign extension
    input  logic start_text,
    input  logic x_text,
    output logic [$clog2(2*N-2)-1:0] step_text,
    output logic busy_text,
    output logic y_valid_text,
    output logic [1:0] y_pair_text,
    output logic [2*N-1-1:0] square_text,
    output logic square_valid_text,
    // Figs. 9+10: two's complement, negative-weight sign
    input  logic start_tneg,
    input  logic x_tneg,
    output logic [$clog2(N)-1:0] step_tneg,
    output logic busy_tneg,
    output logic y_valid_tneg,
    output logic [1:0] y_pair_tneg,
    output logic [2*N-1-1:0] square_tneg,
    output logic square_valid_tneg
);

    sq_diag_cpa #(.N(N)) u_dcpa (
        .clk(clk), .rst_n(rst_n), .start(start_dcpa), .x(x_dcpa),
        .step(step_dcpa), .busy(busy_dcpa), .y_valid(y_valid_dcpa), .y_pair(y_pair_dcpa),
        .square(square_dcpa), .square_valid(square_valid_dcpa)
    );

    sq_diag_csa #(.N(N)) u_dcsa (
        .clk(clk), .rst_n(rst_n), .start(start_dcsa), .x(x_dcsa),
        .step(step_dcsa), .busy(busy_dcsa), .y_valid(y_valid_dcsa), .y_pair(y_pair_dcsa),
        .square(square_dcsa), .square_valid(square_valid_dcsa)
    );

    sq_diag_csa_serial #(.N(N)) u_dser (
        .clk(clk), .rst_n(rst_n), .start(start_dser), .x(x_dser),
        .step(step_dser), .busy(busy_dser), .y_valid(y_valid_dser), .y_pair(y_pair_dser),
        .square(square_dser), .square_valid(square_valid_dser)
    );

    sq_column #(.N(N)) u_col (
        .clk(clk), .rst_n(rst_n), .start(start_col), .x(x_col),
        .step(step_col), .busy(busy_col), .y_valid(y_valid_col), .y_pair(y_pair_col),
        .square(square_col), .square_valid(square_valid_col)
    );

    sq_tc_ext #(.N(N)) u_text (
        .clk(clk), .rst_n(rst_n), .start(start_text), .x(x_text),
        .step(step_text), .busy(busy_text), .y_valid(y_valid_text), .y_pair(y_pair_text),
        .square(square_text), .square_valid(square_valid_text)
    );

    sq_tc_neg #(.N(N)) u_tneg (
        .clk(clk), .rst_n(rst_n), .start(start_tneg), .x(x_tneg),
        .step(step_tneg), .busy(busy_tneg), .y_valid(y_valid_tneg), .y_pair(y_pair_tneg),
        .square(square_tneg), .square_valid(square_valid_tneg)
    );
endmodule
