// Column summer for the column array generator.
//
// Each step it receives the bits of two adjacent array columns, 2m and
// 2m+1, counts them with parallel counters and adds the count to the carry
// left over from the previous pair:
//     acc = carry + ones(even_col) + 2*ones(odd_col)
// The two low bits of acc are the square bits y_2m and y_(2m+1); acc/4 is
// the carry into the next pair, held in a small register. The low square
// bits are also collected in a shift register so that at the last pair the
// complete 2N-bit square is available in parallel. All outputs are
// combinational from the inputs and registers and valid during the step;
// `adv` updates the registers at the edge that ends it, `start` clears them.
// The paper gives only the function of this circuit (two square bits per
// step from two columns per step); the counters, the carry register and the
// result register are this design's own.
module col_summer #(
    parameter int unsigned N  = 5,
    parameter int unsigned KE = 3,
    parameter int unsigned KO = 2,
    localparam int unsigned AW = $clog2(KE + 2*KO + 4) + 1  // accumulator bits
) (
    input  logic          clk,
    input  logic          rst_n,
    input  logic          start,
    input  logic          adv,
    input  logic [KE-1:0] even_col,
    input  logic [KO-1:0] odd_col,
    output logic [1:0]    y_pair,   // {y_(2m+1), y_2m}
    output logic [2*N-1:0] square   // complete square once the last pair is out
);
    logic [AW-1:0]  carry, acc;
    logic [2*N-3:0] low;

    always_comb begin
        acc = carry;
        for (int k = 0; k < KE; k++) acc = acc + AW'(even_col[k]);
        for (int k = 0; k < KO; k++) acc = acc + (AW'(odd_col[k]) << 1);
    end

    assign y_pair = acc[1:0];
    assign square = {acc[1:0], low};

    always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
            carry <= '0;
            low   <= '0;
        end else if (start) begin
            carry <= '0;
            low   <= '0;
        end else if (adv) begin
            carry <= acc >> 2;
            low   <= {acc[1:0], low[2*N-3:2]};
        end
    end
endmodule
