// Summer without carry propagation (carry-save) for the diagonal generator.
//
// The partial sum S_(j-1) is kept as two rows, a carry register c and a sum
// register r, in the same moving frame as the carry-propagate summer: frame
// bit i has relative position p = i - SW, p = 0 being the column of x_j.
// r holds columns p = -1 .. -SW and c holds columns p = -2 .. -(CW+1).
// Each step adds four rows, x_j, D_j, c and r: column p = 0 (x_j and d[0])
// goes through a half adder whose carry goes to the empty p = +1 place of
// the sum row; every lower column goes through a full adder (a half adder
// where only two inputs exist; a column with one input passes), whose sum
// stays in the sum row and whose carry goes one column up into the carry
// row. Both rows are written back shifted right by two places. No carry
// ripples, so a step costs one full-adder delay.
//
// During step t_j the sum row gives two bits of the square that can no
// longer change: y_(j+1) at p = 1-j and y_j at p = -j.
// SERIAL = 0 (defaults CW = N-2, SW = 2N-2): the operation ends at t_(N-1),
// where `total` = sum row + carry row is the complete 2N-bit square (the
// additional parallel adder).
// SERIAL = 1: after t_(N-1) the generator supplies zeros and the summer runs
// N-1 more steps, each giving the next bit of the upper half; with
// CW = 2N-4 and SW = 4N-4 the registers also keep every result bit, so at
// t_(2N-2) the sum row holds the complete square in bits 2N-1 .. 0.
// Register lengths N-2 and 2N-2, the half/full adder rows and the shift by
// two follow the paper; the longer registers of the serial variant are
// sized here to hold the complete result.
module csa_summer #(
    parameter int unsigned N      = 5,
    parameter bit          SERIAL = 1'b0,
    parameter int unsigned CW     = SERIAL ? 2*N-4 : N-2,  // carry cells
    parameter int unsigned SW     = SERIAL ? 4*N-4 : 2*N-2 // sum cells
) (
    input  logic          clk,
    input  logic          rst_n,
    input  logic          start,   // clear both rows
    input  logic          adv,     // write both rows back, shifted by two
    input  logic          xj,
    input  logic [N-2:0]  d,
    output logic [SW+1:0] sum_row,
    output logic [SW+1:0] carry_row,
    output logic [SW+1:0] total    // sum_row + carry_row
);
    logic [SW-1:0] r;
    logic [CW-1:0] c;
    logic [SW+1:0] a, b, e;

    always_comb begin
        a = '0;
        b = '0;
        e = '0;
        for (int k = 0; k < N-1; k++) a[SW-k] = d[k];
        a[SW] = xj ^ d[0];                          // half adder, column 0
        b[SW-2 -: CW] = c;
        e[SW-1:0] = r;
        sum_row   = a ^ b ^ e;
        sum_row[SW+1] = xj & d[0];                  // its carry, column +1
        carry_row = '0;
        for (int i = 0; i < SW+1; i++)
            carry_row[i+1] = (a[i] & b[i]) | (a[i] & e[i]) | (b[i] & e[i]);
        total = sum_row + carry_row;
    end

    always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
            r <= '0;
            c <= '0;
        end else if (start) begin
            r <= '0;
            c <= '0;
        end else if (adv) begin
            r <= sum_row[SW+1:2];
            c <= carry_row[SW -: CW];
        end
    end

    // Carries written back must fit in the carry register.
    a_carry_fits: assert property (@(posedge clk) disable iff (!rst_n)
        adv |-> (carry_row[SW-CW:0] == '0));
endmodule
