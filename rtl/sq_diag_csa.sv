// Serial squarer for unsigned N-bit integers: diagonal array generator and
// carry-save summer, upper half of the square in parallel.
//
// Same interface and schedule as the carry-propagate version: x_0 with
// `start`, one operand bit per clock after it, step t_j in the clock after
// x_j was sampled, `y_pair` = {y_(j+1), y_j} during t_j, and the complete
// 2N-bit `square` during the last step t_(N-1). The summer keeps the partial
// sum as two rows (carry-save) and adds each diagonal with one row of full
// and half adders, so no carry propagates during t_0 .. t_(N-2); only in
// t_(N-1) an additional parallel adder merges the two rows into the upper
// half of the square. The scheme is the paper's; ports and start strobe
// are this design's own.
module sq_diag_csa #(
    parameter int unsigned N = 5,
    localparam int unsigned STEPS = N,
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
    localparam int unsigned SW = 2*N-2;
    logic         last, xj;
    logic [N-2:0] d;
    logic [SW+1:0] sum_row, total;

    sq_step_ctrl #(.STEPS(STEPS)) u_ctrl (
        .clk(clk), .rst_n(rst_n), .start(start), .step(step), .busy(busy), .last(last)
    );

    diag_array_gen #(.N(N)) u_gen (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(busy && !last), .x(x),
        .xj(xj), .d(d)
    );

    csa_summer #(.N(N), .SERIAL(1'b0)) u_sum (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(busy && !last),
        .xj(xj), .d(d), .sum_row(sum_row), .carry_row(), .total(total)
    );

    always_comb begin
        y_pair = {sum_row[SW+1-32'(step)], sum_row[SW-32'(step)]};
    end
    assign y_valid      = busy;
    assign square       = total;
    assign square_valid = last;
endmodule
