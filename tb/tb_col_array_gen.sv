// Self-checking testbench for col_array_gen, the column array generator.
//
// For every operand of the default N = 5 the operand is shifted in (zeros
// after x_(N-1)) and in each step t_j the number of ones on the even and odd
// column outputs is compared with the number of ones in columns 2m and
// 2m+1 (m = j - (N-1)/2) of the reduced squarer array, counted here
// directly from its definition: column c holds x_i for 2i = c and
// x_i*x_l for i > l, i+l+1 = c. Before step t_((N-1)/2) the outputs must be
// zero. This also checks that every array term appears exactly once.
module tb_col_array_gen;
    localparam int unsigned N  = 5;
    localparam int unsigned C0 = (N-1)/2;
    localparam int unsigned KE = ((C0 < N-2-C0) ? C0 : N-2-C0) + 2;
    localparam int unsigned KO = (C0 < N-1-C0) ? C0 : N-1-C0;
    logic clk = 1'b0;
    logic rst_n, start, shift, x;
    logic [KE-1:0] even_col;
    logic [KO-1:0] odd_col;
    int checks = 0, failures = 0;

    col_array_gen dut (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(shift), .x(x),
        .even_col(even_col), .odd_col(odd_col)
    );

    always #5 clk = ~clk;

    initial begin : watchdog
        repeat (20000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    function automatic int col_ones(input logic [N-1:0] xv, input int c);
        int n = 0;
        if (c < 0) return 0;
        for (int i = 0; i < N; i++) begin
            if (2*i == c) n += int'(xv[i]);
            for (int l = 0; l < i; l++) if (i+l+1 == c) n += int'(xv[i] & xv[l]);
        end
        return n;
    endfunction

    task automatic check(input logic ok, input string what, input int v, input int j);
        checks++;
        if (!ok) begin
            failures++;
            if (failures < 20) $display("FAIL %s operand %0d step %0d", what, v, j);
        end
    endtask

    initial begin
        rst_n = 1'b0; start = 1'b0; shift = 1'b0; x = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int v = 0; v < 2**N; v++) begin
            logic [N-1:0] xv;
            xv = N'(v);
            start = 1'b1; x = xv[0];
            for (int j = 0; j < C0+N; j++) begin
                int m;
                @(negedge clk);
                start = 1'b0;
                shift = 1'b1;
                x = (j+1 < N) ? xv[j+1] : 1'b0;
                m = j - int'(C0);
                check($countones(even_col) == col_ones(xv, (m < 0) ? -1 : 2*m), "even column", v, j);
                check($countones(odd_col) == col_ones(xv, (m < 0) ? -1 : 2*m+1), "odd column", v, j);
            end
            shift = 1'b0;
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
