// Serial squarer for unsigned N-bit integers that generates the reduced
// squarer array column by column, two columns per step.
//
// The operand is applied as in the other schemes (x_0 with `start`, one bit
// per clock, zeros shifted in after x_(N-1)). The column generator's AND
// gates sit about the centre cell C0 = (N-1)/2 of its register, so the first
// columns appear in step t_C0, once x_0 has reached the centre; from then on
// every step delivers columns 2m and 2m+1 and the column summer turns them
// into the square bits y_2m and y_(2m+1): `y_pair` = {y_(2m+1), y_2m} during
// t_(C0+m), flagged by `y_valid`. For N = 5 that is t_2 .. t_6. In the last
// step t_(C0+N-1) the complete `square` is available (`square_valid`).
// One operation takes C0+N clocks. The generator and schedule are the
// paper's; the summer is this design's own circuit for the function the
// paper states.
module sq_column #(
    parameter int unsigned N = 5,
    localparam int unsigned C0 = (N-1)/2,
    localparam int unsigned STEPS = C0 + N,
    localparam int unsigned STW = $clog2(STEPS)
) (
    input  logic           clk,
    input  logic           rst_n,
    input  logic           start,
    input  logic           x,
    output logic [STW-1:0] step,
    output logic           busy,
    output logic           y_valid,
    output logic [1:0]     y_pair,
    output logic [2*N-1:0] square,
    output logic           square_valid
);
    localparam int unsigned KE = ((C0 < N-2-C0) ? C0 : N-2-C0) + 2;
    localparam int unsigned KO = (C0 < N-1-C0) ? C0 : N-1-C0;
    logic          last, x_in;
    logic [KE-1:0] even_col;
    logic [KO-1:0] odd_col;

    sq_step_ctrl #(.STEPS(STEPS)) u_ctrl (
        .clk(clk), .rst_n(rst_n), .start(start), .step(step), .busy(busy), .last(last)
    );

    assign x_in = start ? x : (x && (32'(step) < N-1));

    col_array_gen #(.N(N)) u_gen (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(busy && !last), .x(x_in),
        .even_col(even_col), .odd_col(odd_col)
    );

    col_summer #(.N(N), .KE(KE), .KO(KO)) u_sum (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(busy && !last),
        .even_col(even_col), .odd_col(odd_col), .y_pair(y_pair), .square(square)
    );

    assign y_valid      = busy && (32'(step) >= C0);
    assign square_valid = last;
endmodule
