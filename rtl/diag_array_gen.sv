// Array generator "by diagonal" of a serial squarer.
//
// An N-stage shift register holds the operand bits received so far, the
// newest in cell 0. During step t_j the register holds x_j .. x_0 (cells
// beyond j are cleared by `start`), and N-1 two-input AND gates form the
// diagonal of the reduced squarer array belonging to x_j:
//     xj   = x_j                    (the term x_j*x_j, weight 4^j)
//     d[k] = x_j & x_(j-1-k)        (weight 2^(2j-k), k = 0 .. N-2)
// so d[0] has the same weight as xj and each further d[k] is one place lower.
// The outputs are combinational from the register, so they are valid during
// the whole step. `start` loads {x, 0, ..., 0} (step t_0); `shift` loads the
// next bit on top of the others; with neither the register holds, which the
// sign-extension squarer uses to keep its last diagonal. Register length,
// gate count and weights follow the paper's diagonal generator; the load and
// hold controls are this design's own.
module diag_array_gen #(
    parameter int unsigned N = 5
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         start,  // load x as x_0 and clear the other cells
    input  logic         shift,  // shift x in as the next operand bit
    input  logic         x,
    output logic         xj,     // x_j
    output logic [N-2:0] d       // D_j, d[0] is the most significant term
);
    logic [N-1:0] xreg;          // xreg[0] = x_j

    always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     xreg <= '0;
        else if (start) xreg <= {{(N-1){1'b0}}, x};
        else if (shift) xreg <= {xreg[N-2:0], x};
    end

    assign xj = xreg[0];
    always_comb begin
        for (int k = 0; k < N-1; k++) d[k] = xreg[0] & xreg[k+1];
    end
endmodule
