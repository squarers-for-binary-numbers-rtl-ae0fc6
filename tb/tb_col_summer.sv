// Self-checking testbench for col_summer, the summer of the column scheme.
//
// Random column bits are applied for N steps after each start (pair m in
// step m). The testbench keeps the running value
//     V = sum over m of (ones(even_col) + 2*ones(odd_col)) * 4^m
// and checks that in step m the square-bit pair equals bits 2m+1 and 2m of
// V, and that in the last step the full output equals V mod 2^(2N).
module tb_col_summer;
    localparam int unsigned N  = 5;
    localparam int unsigned KE = 3;
    localparam int unsigned KO = 2;
    logic clk = 1'b0;
    logic rst_n, start, adv;
    logic [KE-1:0] even_col;
    logic [KO-1:0] odd_col;
    logic [1:0] y_pair;
    logic [2*N-1:0] square;
    int checks = 0, failures = 0;

    col_summer dut (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(adv),
        .even_col(even_col), .odd_col(odd_col), .y_pair(y_pair), .square(square)
    );

    always #5 clk = ~clk;

    initial begin : watchdog
        repeat (20000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    task automatic check(input logic ok, input string what, input int t, input int m);
        checks++;
        if (!ok) begin
            failures++;
            if (failures < 20) $display("FAIL %s trial %0d pair %0d", what, t, m);
        end
    endtask

    initial begin
        longint unsigned val;
        rst_n = 1'b0; start = 1'b0; adv = 1'b0; even_col = '0; odd_col = '0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int t = 0; t < 300; t++) begin
            start = 1'b1;
            @(negedge clk);
            start = 1'b0;
            val = 0;
            for (int m = 0; m < N; m++) begin
                even_col = KE'($urandom);
                odd_col  = KO'($urandom);
                val += longint'($countones(even_col) + 2*$countones(odd_col)) << (2*m);
                #1;
                check(y_pair === 2'(val >> (2*m)), "pair", t, m);
                if (m == N-1) check(square === (2*N)'(val), "square", t, m);
                adv = (m < N-1);
                @(negedge clk);
                adv = 1'b0;
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
