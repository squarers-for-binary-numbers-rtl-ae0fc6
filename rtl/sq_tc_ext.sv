// Serial squarer for N-bit two's-complement integers by sign extension.
//
// Extending the operand to the left with copies of its sign bit s = x_(N-1)
// makes it an unsigned number with the same square modulo 2^(2N-1), the width
// of the result (X = -2^(N-1) included). Its diagonals after t_(N-1) are all
// the same, s*x_(N-2) .. s*x_0, each one place higher than the one before
// (terms s*s land above the result). So the diagonal generator is loaded
// with x_0 .. x_(N-1) as usual and then holds its content, and the
// carry-propagate summer runs N-2 more steps, t_N .. t_(2N-3), writing its
// sum back shifted by one place instead of two. Bits of the summer that lie
// at weight 2^(2N-1) or above are pseudo-significant and are dropped.
// During t_j `y_pair` = {y_(j+1), y_j}; in the last step t_(2N-3) the
// (2N-1)-bit `square` is complete (`square_valid`). One operation takes
// 2N-2 clocks. With FULL_RANGE = 0 the most negative operand -2^(N-1) is
// excluded, the square needs only 2N-2 bits (the top bit of `square` is 0)
// and the operation ends one step earlier, at t_(2N-4). The scheme is the paper's; the summer keeps 3N-4 register
// cells so that the complete result stays available, and the ports and
// start strobe are this design's own.
module sq_tc_ext #(
    parameter int unsigned N = 5,
    parameter bit FULL_RANGE = 1'b1,  // 0: operand -2^(N-1) excluded
    localparam int unsigned STEPS = FULL_RANGE ? 2*N-2 : 2*N-3,
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
    output logic [2*N-2:0] square,
    output logic           square_valid
);
    localparam int unsigned SW = 3*N-4;
    logic          last, xj, ext;
    logic [N-2:0]  d;
    logic [SW+1:0] s;

    sq_step_ctrl #(.STEPS(STEPS)) u_ctrl (
        .clk(clk), .rst_n(rst_n), .start(start), .step(step), .busy(busy), .last(last)
    );

    // steps t_(N-1) onwards: diagonal held, sum shifted by one place
    assign ext = 32'(step) >= N-1;

    diag_array_gen #(.N(N)) u_gen (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(busy && !ext), .x(x),
        .xj(xj), .d(d)
    );

    cpa_summer #(.N(N), .SW(SW)) u_sum (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(busy && !last),
        .shift_one(ext), .xj(xj), .d(d), .cin(1'b0), .s(s)
    );

    always_comb begin
        if (ext) y_pair = {s[SW+2-N], s[SW+1-N]};
        else     y_pair = {s[SW+1-32'(step)], s[SW-32'(step)]};
    end
    assign y_valid      = busy;
    // in the last step y_0 sits at bit 0 (full range) or bit 1 (one step less)
    assign square       = FULL_RANGE ? s[2*N-2:0] : {1'b0, s[2*N-2:1]};
    assign square_valid = last;
endmodule
