// Serial squarer for N-bit two's-complement integers, using the squarer
// array with a negative-weight sign bit.
//
// With s = x_(N-1) of weight -2^(N-1), the only negative terms of the reduced
// array are the diagonal s*x_(N-2) .. s*x_0 added in the last step. The
// two's-complement generator complements that diagonal during t_(N-1) and
// supplies an auxiliary 1 at the weight of its lowest term; the summer adds
// the 1 as the carry-in of its parallel adder. Working modulo 2^(2N-1), this
// gives the exact square in the same N steps as an unsigned squarer.
// During t_j `y_pair` = {y_(j+1), y_j}; during t_(N-1) the whole (2N-1)-bit
// `square` is available in parallel (`square_valid`); the carry column above
// it is pseudo-significant and not brought out. One operation takes N
// clocks. The scheme is the paper's; the ports and start strobe are this
// design's own.
module sq_tc_neg #(
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
    output logic [2*N-2:0] square,
    output logic           square_valid
);
    localparam int unsigned SW = 2*N-2;
    logic          last, xj, aux;
    logic [N-2:0]  d;
    logic [SW+1:0] s;

    sq_step_ctrl #(.STEPS(STEPS)) u_ctrl (
        .clk(clk), .rst_n(rst_n), .start(start), .step(step), .busy(busy), .last(last)
    );

    tc_diag_array_gen #(.N(N)) u_gen (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(busy && !last), .last(last),
        .x(x), .xj(xj), .d(d), .aux(aux)
    );

    cpa_summer #(.N(N), .SW(SW)) u_sum (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(busy && !last),
        .shift_one(1'b0), .xj(xj), .d(d), .cin(aux), .s(s)
    );

    always_comb begin
        y_pair = {s[SW+1-32'(step)], s[SW-32'(step)]};
    end
    assign y_valid      = busy;
    assign square       = s[2*N-2:0];
    assign square_valid = last;
endmodule
