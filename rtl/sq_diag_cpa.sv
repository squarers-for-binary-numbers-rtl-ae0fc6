// Serial squarer for unsigned N-bit integers: diagonal array generator and
// carry-propagate summer.
//
// The operand enters least significant bit first, one bit per clock. The
// edge that samples `start` and x_0 begins step t_0; the edge that ends step
// t_j samples x_(j+1). During t_j the generator supplies x_j and the diagonal
// D_j = x_j*x_(j-1) .. x_j*x_0, and the summer forms S_j = S_(j-1) + x_j + D_j,
// which equals (x_j .. x_0)^2. The bits below weight 2^(j+2) of S_j can no
// longer change, so `y_pair` = {y_(j+1), y_j} during t_j: y_0 and y_1 (which
// is always 0) in t_0, y_2 in t_1 and so on, each square bit as soon as the
// operand bits it depends on are in. In the last step t_(N-1) `square` holds
// all 2N bits, the upper half in parallel, and `square_valid` is high.
// Interface: one operation takes N clocks; a new `start` may follow directly
// after the last operand bit. The structure and schedule are the paper's;
// the start strobe and the port layout are this design's own.
module sq_diag_cpa #(
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
    logic [SW+1:0] s;

    sq_step_ctrl #(.STEPS(STEPS)) u_ctrl (
        .clk(clk), .rst_n(rst_n), .start(start), .step(step), .busy(busy), .last(last)
    );

    diag_array_gen #(.N(N)) u_gen (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(busy && !last), .x(x),
        .xj(xj), .d(d)
    );

    cpa_summer #(.N(N), .SW(SW)) u_sum (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(busy && !last),
        .shift_one(1'b0), .xj(xj), .d(d), .cin(1'b0), .s(s)
    );

    always_comb begin
        y_pair = {s[SW+1-32'(step)], s[SW-32'(step)]};
    end
    assign y_valid      = busy;
    assign square       = s;
    assign square_valid = last;
endmodule
