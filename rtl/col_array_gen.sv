// Array generator "by column": two columns of the reduced squarer array per
// step.
//
// An N-cell shift register receives the operand bits, the newest in cell 0,
// so during step t_j cell c holds x_(j-c) (zero before x_0 and after
// x_(N-1)). With the centre cell C0 = (N-1)/2, the AND gates sit at fixed
// cell pairs placed symmetrically about the centre, and during step t_j they
// give columns 2m and 2m+1 (m = j - C0) of the reduced array:
//     even column 2m  : x_m (centre cell) and x_(m+k)*x_(m-1-k),
//                       cells (C0-k, C0+1+k), k = 0 .. KE-2
//     odd column 2m+1 : x_(m+k)*x_(m-k), cells (C0-k, C0+k), k = 1 .. KO
// For N = 5 the outputs are zero in t_0 and t_1, give column 0 in t_2,
// columns 2 and 3 in t_3, 4 and 5 in t_4 and so on to column 8 in t_6.
// Outputs are combinational from the register and valid during the step.
// `start` loads x as x_0 and clears the other cells; `shift` shifts the next
// bit in (the caller shifts zeros after the last operand bit). The register,
// the two gate sets and the step schedule follow the paper's column
// generator; the gate placement for N other than 5 is derived here from the
// same symmetry.
module col_array_gen #(
    parameter int unsigned N = 5,
    localparam int unsigned C0 = (N-1)/2,
    localparam int unsigned KE = ((C0 < N-2-C0) ? C0 : N-2-C0) + 2, // even bits
    localparam int unsigned KO = (C0 < N-1-C0) ? C0 : N-1-C0        // odd bits
) (
    input  logic          clk,
    input  logic          rst_n,
    input  logic          start,
    input  logic          shift,
    input  logic          x,
    output logic [KE-1:0] even_col,  // bits of column 2m
    output logic [KO-1:0] odd_col    // bits of column 2m+1
);
    logic [N-1:0] sreg;

    always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     sreg <= '0;
        else if (start) sreg <= {{(N-1){1'b0}}, x};
        else if (shift) sreg <= {sreg[N-2:0], x};
    end

    always_comb begin
        even_col[0] = sreg[C0];
        for (int k = 0; k < KE-1; k++) even_col[k+1] = sreg[C0-k] & sreg[C0+1+k];
        for (int k = 1; k <= KO; k++)  odd_col[k-1]  = sreg[C0-k] & sreg[C0+k];
    end
endmodule
