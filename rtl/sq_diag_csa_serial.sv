// Serial squarer for unsigned N-bit integers: diagonal array generator and
// carry-save summer, the whole square in serial form.
//
// The operand is applied as in the other schemes (x_0 with `start`, one bit
// per clock). After the last operand bit the generator is fed zeros and the
// carry-save summer runs N-1 more steps, t_N .. t_(2N-2), in which no new
// terms arrive and each step resolves one more bit of the upper half. During
// every step t_j `y_pair` = {y_(j+1), y_j}, so one new square bit per clock
// follows directly after the lower half: y_0 y_1 in t_0 and y_(j+1) in t_j,
// up to y_(2N-1) in t_(2N-2). Longer registers keep every result bit, so the
// complete `square` is also available in the last step (`square_valid`).
// One operation takes 2N-1 clocks; the next `start` may come with the edge
// that ends t_(2N-2). The scheme is the paper's; the zero feeding, ports and
// start strobe are this design's own.
module sq_diag_csa_serial #(
    parameter int unsigned N = 5,
    localparam int unsigned STEPS = 2*N-1,
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
    localparam int unsigned SW = 4*N-4;
    logic         last, xj, x_in;
    logic [N-2:0] d;
    logic [SW+1:0] sum_row;

    sq_step_ctrl #(.STEPS(STEPS)) u_ctrl (
        .clk(clk), .rst_n(rst_n), .start(start), .step(step), .busy(busy), .last(last)
    );

    // operand bits x_1 .. x_(N-1), zeros afterwards
    assign x_in = start ? x : (x && (32'(step) < N-1));

    diag_array_gen #(.N(N)) u_gen (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(busy && !last), .x(x_in),
        .xj(xj), .d(d)
    );

    csa_summer #(.N(N), .SERIAL(1'b1)) u_sum (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(busy && !last),
        .xj(xj), .d(d), .sum_row(sum_row), .carry_row(), .total()
    );

    always_comb begin
        y_pair = {sum_row[SW+1-32'(step)], sum_row[SW-32'(step)]};
    end
    assign y_valid      = busy;
    assign square       = sum_row[2*N-1:0];
    assign square_valid = last;
endmodule
