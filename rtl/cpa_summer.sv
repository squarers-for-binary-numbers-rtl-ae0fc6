// Summer with a carry-propagate adder for the diagonal array generator.
//
// It accumulates S_j = S_(j-1) + x_j + D_j, one diagonal per step, in a
// frame that follows the weight of x_j: bit i of the frame has relative
// position p = i - SW, where p = 0 is the column of x_j (and of d[0]), so
// s[SW+1] is the carry column p = +1 and s[0] the lowest stored column.
// The register r holds S_(j-1) in columns p = -1 .. -SW. Only the N-1
// leftmost columns p = 0 .. -(N-2) receive new terms; they hold two
// variables each (x_j or r, and d) and go through an (N-1)-stage parallel
// adder with carry-in `cin`; the lower SW-N+2 register bits pass unchanged.
// At the end of a step the leftmost bits of S_j are written back into r
// shifted right by two places (weight times four, as x_j moves to x_(j+1)),
// or by one place when `shift_one` is high (the two's-complement scheme that
// re-adds the same diagonal one place higher). `start` clears r (S_(-1) = 0).
//
// Timing: s is combinational from r, xj, d and cin, valid during the step;
// `adv` writes it back at the edge that ends the step. Adder width, register
// length 2N-2 (the default), the shift by two and by one follow the paper;
// SW is a parameter so the same summer serves the schemes that keep more
// result bits, and the carry-in is this design's way of adding the
// auxiliary "1" of the negative-weight two's-complement scheme.
module cpa_summer #(
    parameter int unsigned N  = 5,
    parameter int unsigned SW = 2*N-2  // register cells, p = -1 .. -SW
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         start,      // clear the partial sum
    input  logic         adv,        // write S_j back at the end of the step
    input  logic         shift_one,  // write back shifted by one, not two
    input  logic         xj,
    input  logic [N-2:0] d,
    input  logic         cin,        // extra 1 in column p = -(N-2)
    output logic [SW+1:0] s          // S_j, columns p = +1 .. -SW
);
    logic [SW-1:0] r;
    logic [N-2:0]  op_a, op_b;
    logic [N-1:0]  add;

    always_comb begin
        op_a = {xj, r[SW-1 -: N-2]};
        for (int k = 0; k < N-1; k++) op_b[N-2-k] = d[k];
        add = {1'b0, op_a} + {1'b0, op_b} + {{(N-1){1'b0}}, cin};
        s = {add, r[SW-N+1:0]};
    end

    always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)         r <= '0;
        else if (start)     r <= '0;
        else if (adv) begin
            if (shift_one)  r <= s[SW:1];
            else            r <= s[SW+1:2];
        end
    end
endmodule
