// Self-checking testbench for cpa_summer, the summer with a carry-propagate
// adder.
//
// The testbench plays the diagonal generator itself: for each operand it
// supplies x_j and the diagonal x_j*x_(j-1) .. x_j*x_0 step by step and
// checks the summer in three uses.
//   A  unsigned squaring (register 2N-2 cells): after every step the whole
//      output row must equal (x_j .. x_0)^2 placed with x_j's weight at
//      bit 2N-2, i.e. shifted left by 2N-2-2j.
//   B  negative-weight sign bit: in the last step the diagonal is inverted
//      and the carry-in is 1; the low 2N-1 bits must be the square of the
//      operand read as two's complement.
//   C  sign extension (register 3N-4 cells): the last diagonal is held for
//      N-2 more steps while the sum is written back shifted by one place;
//      the low 2N-1 bits must again be the two's-complement square.
// Every operand of the default N = 5 is used in each mode.
module tb_cpa_summer;
    localparam int unsigned N   = 5;
    localparam int unsigned SWA = 2*N-2;
    localparam int unsigned SWC = 3*N-4;
    logic clk = 1'b0;
    logic rst_n;
    logic start_a, adv_a, xj_a, cin_a, start_c, adv_c, xj_c, sh_c;
    logic [N-2:0] d_a, d_c;
    logic [SWA+1:0] s_a;
    logic [SWC+1:0] s_c;
    int checks = 0, failures = 0;

    cpa_summer #(.N(N), .SW(SWA)) u_a (
        .clk(clk), .rst_n(rst_n), .start(start_a), .adv(adv_a), .shift_one(1'b0),
        .xj(xj_a), .d(d_a), .cin(cin_a), .s(s_a)
    );
    cpa_summer #(.N(N), .SW(SWC)) u_c (
        .clk(clk), .rst_n(rst_n), .start(start_c), .adv(adv_c), .shift_one(sh_c),
        .xj(xj_c), .d(d_c), .cin(1'b0), .s(s_c)
    );

    always #5 clk = ~clk;

    initial begin : watchdog
        repeat (20000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    task automatic check(input logic ok, input string what, input int v, input int j);
        checks++;
        if (!ok) begin
            failures++;
            if (failures < 20) $display("FAIL %s operand %0d step %0d", what, v, j);
        end
    endtask

    function automatic logic [N-2:0] diag(input logic [N-1:0] xv, input int j);
        logic [N-2:0] dd;
        for (int k = 0; k < N-1; k++) dd[k] = (j-1-k >= 0) ? (xv[j] & xv[j-1-k]) : 1'b0;
        return dd;
    endfunction

    initial begin
        longint unsigned part, expv;
        logic signed [N-1:0] xs;
        logic [2*N-2:0] tc_sq;
        rst_n = 1'b0;
        {start_a, adv_a, xj_a, cin_a, start_c, adv_c, xj_c, sh_c} = '0;
        d_a = '0; d_c = '0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int mode = 0; mode < 3; mode++) begin
            for (int v = 0; v < 2**N; v++) begin
                logic [N-1:0] xv;
                xv = N'(v);
                xs = xv;
                tc_sq = (2*N-1)'(xs * xs);
                @(negedge clk);
                start_a = (mode < 2); start_c = (mode == 2);
                @(negedge clk);
                start_a = 1'b0; start_c = 1'b0;
                if (mode < 2) begin
                    for (int j = 0; j < N; j++) begin
                        xj_a  = xv[j];
                        d_a   = diag(xv, j);
                        cin_a = 1'b0;
                        if (mode == 1 && j == N-1) begin
                            d_a   = ~d_a;
                            cin_a = 1'b1;
                        end
                        #1;
                        if (mode == 0) begin
                            part = longint'(xv) & ((64'd1 << (j+1)) - 1);
                            expv = (part * part) << (SWA - 2*j);
                            check(64'(s_a) == expv, "mode A partial sum", v, j);
                        end else if (j == N-1) begin
                            check(s_a[2*N-2:0] === tc_sq, "mode B square", v, j);
                        end
                        adv_a = (j < N-1);
                        @(negedge clk);
                        adv_a = 1'b0;
                    end
                end else begin
                    for (int j = 0; j < 2*N-2; j++) begin
                        int jj;
                        jj   = (j < N) ? j : N-1;   // diagonal held after t_(N-1)
                        xj_c = xv[jj];
                        d_c  = diag(xv, jj);
                        sh_c = (j >= N-1);
                        #1;
                        if (j < N-1) begin
                            part = longint'(xv) & ((64'd1 << (j+1)) - 1);
                            expv = (part * part) << (SWC - 2*j);
                            check(64'(s_c) == expv, "mode C partial sum", v, j);
                        end
                        if (j == 2*N-3) check(s_c[2*N-2:0] === tc_sq, "mode C square", v, j);
                        adv_c = (j < 2*N-3);
                        @(negedge clk);
                        adv_c = 1'b0;
                    end
                end
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
