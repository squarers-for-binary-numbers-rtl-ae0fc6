// End-to-end testbench for serial_squarers_top, all six squarers at once.
//
// Each squarer gets its own driver thread that applies operands bit-serially
// (first every N-bit value, then random ones), with random gaps of zero to
// two clocks, and about one operation in ten cut short by a new start. In
// every step the thread checks the step index, the current pair of square
// bits and, in the last step, the complete square against the product worked
// out here with `*` (two's complement for the two signed squarers). It
// counts how often each mechanism occurred and counts a failure for any that
// never did: operations back to back, restarts in mid-operation, the upper
// half delivered in parallel, the upper half delivered serially, the idle
// steps of the column scheme, the shift-by-one steps of the sign-extension
// scheme, the complemented diagonal of the negative-weight scheme, negative
// operands and the most negative operand, and carries held in the carry-save
// summers. The top runs with its default parameters.
module tb_serial_squarers_top;
    localparam int unsigned N   = 5;
    localparam int unsigned C0  = (N-1)/2;
    localparam int unsigned OPS = 200;
    logic clk = 1'b0;
    logic rst_n;
    localparam int unsigned ST_dcpa = N;
    logic start_dcpa, x_dcpa, busy_dcpa, y_valid_dcpa, square_valid_dcpa;
    logic [$clog2(ST_dcpa)-1:0] step_dcpa;
    logic [1:0] y_pair_dcpa;
    logic [2*N-1:0] square_dcpa;
    localparam int unsigned ST_dcsa = N;
    logic start_dcsa, x_dcsa, busy_dcsa, y_valid_dcsa, square_valid_dcsa;
    logic [$clog2(ST_dcsa)-1:0] step_dcsa;
    logic [1:0] y_pair_dcsa;
    logic [2*N-1:0] square_dcsa;
    localparam int unsigned ST_dser = 2*N-1;
    logic start_dser, x_dser, busy_dser, y_valid_dser, square_valid_dser;
    logic [$clog2(ST_dser)-1:0] step_dser;
    logic [1:0] y_pair_dser;
    logic [2*N-1:0] square_dser;
    localparam int unsigned ST_col = C0+N;
    logic start_col, x_col, busy_col, y_valid_col, square_valid_col;
    logic [$clog2(ST_col)-1:0] step_col;
    logic [1:0] y_pair_col;
    logic [2*N-1:0] square_col;
    localparam int unsigned ST_text = 2*N-2;
    logic start_text, x_text, busy_text, y_valid_text, square_valid_text;
    logic [$clog2(ST_text)-1:0] step_text;
    logic [1:0] y_pair_text;
    logic [2*N-1-1:0] square_text;
    localparam int unsigned ST_tneg = N;
    logic start_tneg, x_tneg, busy_tneg, y_valid_tneg, square_valid_tneg;
    logic [$clog2(ST_tneg)-1:0] step_tneg;
    logic [1:0] y_pair_tneg;
    logic [2*N-1-1:0] square_tneg;
    int checks = 0, failures = 0;
    int done_dcpa = 0, done_dcsa = 0, done_dser = 0, done_col = 0, done_text = 0, done_tneg = 0;
    int n_back_to_back = 0, n_restart = 0, n_parallel_msh = 0, n_serial_msh = 0;
    int n_col_idle = 0, n_shift_one = 0, n_complement = 0, n_negative = 0, n_xmin = 0;
    int n_csa_carry = 0;

    serial_squarers_top dut (
        .clk(clk), .rst_n(rst_n),
        .start_dcpa(start_dcpa), .x_dcpa(x_dcpa), .step_dcpa(step_dcpa), .busy_dcpa(busy_dcpa),
        .y_valid_dcpa(y_valid_dcpa), .y_pair_dcpa(y_pair_dcpa), .square_dcpa(square_dcpa),
        .square_valid_dcpa(square_valid_dcpa),
        .start_dcsa(start_dcsa), .x_dcsa(x_dcsa), .step_dcsa(step_dcsa), .busy_dcsa(busy_dcsa),
        .y_valid_dcsa(y_valid_dcsa), .y_pair_dcsa(y_pair_dcsa), .square_dcsa(square_dcsa),
        .square_valid_dcsa(square_valid_dcsa),
        .start_dser(start_dser), .x_dser(x_dser), .step_dser(step_dser), .busy_dser(busy_dser),
        .y_valid_dser(y_valid_dser), .y_pair_dser(y_pair_dser), .square_dser(square_dser),
        .square_valid_dser(square_valid_dser),
        .start_col(start_col), .x_col(x_col), .step_col(step_col), .busy_col(busy_col),
        .y_valid_col(y_valid_col), .y_pair_col(y_pair_col), .square_col(square_col),
        .square_valid_col(square_valid_col),
        .start_text(start_text), .x_text(x_text), .step_text(step_text), .busy_text(busy_text),
        .y_valid_text(y_valid_text), .y_pair_text(y_pair_text), .square_text(square_text),
        .square_valid_text(square_valid_text),
        .start_tneg(start_tneg), .x_tneg(x_tneg), .step_tneg(step_tneg), .busy_tneg(busy_tneg),
        .y_valid_tneg(y_valid_tneg), .y_pair_tneg(y_pair_tneg), .square_tneg(square_tneg),
        .square_valid_tneg(square_valid_tneg)
    );

    always #5 clk = ~clk;

    // carries held in the carry registers of the two carry-save summers
    always @(posedge clk) begin
        if (dut.u_dcsa.u_sum.c != '0) n_csa_carry++;
        if (dut.u_dser.u_sum.c != '0) n_csa_carry++;
    end

    initial begin : watchdog
        repeat (100000) @(posedge clk);
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    function automatic void chk(input logic ok, input string what);
        checks++;
        if (!ok) begin
            failures++;
            if (failures < 20) $display("FAIL %s at %0t", what, $time);
        end
    endfunction

    function automatic void seen(input int n, input string what);
        $display("%-28s %0d", what, n);
        checks++;
        if (n == 0) begin
            failures++;
            $display("FAIL mechanism never exercised: %s", what);
        end
    endfunction

    initial begin
        rst_n = 1'b0;
        start_dcpa = 1'b0; x_dcpa = 1'b0; start_dcsa = 1'b0; x_dcsa = 1'b0; start_dser = 1'b0; x_dser = 1'b0; start_col = 1'b0; x_col = 1'b0; start_text = 1'b0; x_text = 1'b0; start_tneg = 1'b0; x_tneg = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        @(negedge clk);
        fork
        begin : drv_dcpa
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            int stop_at, gap;
            for (int op = 0; op < OPS; op++) begin
                xv = (op < 2**N) ? N'(op) : N'($urandom);
                rs = (2*N)'(xv) * (2*N)'(xv);
                
                stop_at = ($urandom_range(0, 9) == 0) ? $urandom_range(0, ST_dcpa-2) : ST_dcpa;
                if (stop_at < ST_dcpa) n_restart++;
                start_dcpa = 1'b1;
                x_dcpa = xv[0];
                for (int k = 0; k < ST_dcpa; k++) begin
                    @(negedge clk);
                    chk(busy_dcpa === 1'b1 && step_dcpa === ($clog2(ST_dcpa))'(k), "dcpa step");
                    chk(y_valid_dcpa === 1'b1 && y_pair_dcpa === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]}, "dcpa pair");
                    chk(square_valid_dcpa === (k == ST_dcpa-1), "dcpa square_valid");
                    if (k == ST_dcpa-1) begin
                        chk(square_dcpa === rs[2*N-1:0], "dcpa square");
                        done_dcpa++;
                    end
                     if (k == N-1) n_parallel_msh++;
                    start_dcpa = 1'b0;
                    x_dcpa = (k+1 < N) ? xv[k+1] : 1'($urandom);
                    if (k == stop_at) break;
                end
                if (stop_at == ST_dcpa) begin
                    gap = $urandom_range(0, 2);
                    if (gap == 0) n_back_to_back++;
                    repeat (gap) begin
                        @(negedge clk);
                        chk(busy_dcpa === 1'b0, "dcpa idle");
                    end
                end
            end
            @(negedge clk);
        end
        begin : drv_dcsa
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            int stop_at, gap;
            for (int op = 0; op < OPS; op++) begin
                xv = (op < 2**N) ? N'(op) : N'($urandom);
                rs = (2*N)'(xv) * (2*N)'(xv);
                
                stop_at = ($urandom_range(0, 9) == 0) ? $urandom_range(0, ST_dcsa-2) : ST_dcsa;
                if (stop_at < ST_dcsa) n_restart++;
                start_dcsa = 1'b1;
                x_dcsa = xv[0];
                for (int k = 0; k < ST_dcsa; k++) begin
                    @(negedge clk);
                    chk(busy_dcsa === 1'b1 && step_dcsa === ($clog2(ST_dcsa))'(k), "dcsa step");
                    chk(y_valid_dcsa === 1'b1 && y_pair_dcsa === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]}, "dcsa pair");
                    chk(square_valid_dcsa === (k == ST_dcsa-1), "dcsa square_valid");
                    if (k == ST_dcsa-1) begin
                        chk(square_dcsa === rs[2*N-1:0], "dcsa square");
                        done_dcsa++;
                    end
                     if (k == N-1) n_parallel_msh++;
                    start_dcsa = 1'b0;
                    x_dcsa = (k+1 < N) ? xv[k+1] : 1'($urandom);
                    if (k == stop_at) break;
                end
                if (stop_at == ST_dcsa) begin
                    gap = $urandom_range(0, 2);
                    if (gap == 0) n_back_to_back++;
                    repeat (gap) begin
                        @(negedge clk);
                        chk(busy_dcsa === 1'b0, "dcsa idle");
                    end
                end
            end
            @(negedge clk);
        end
        begin : drv_dser
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            int stop_at, gap;
            for (int op = 0; op < OPS; op++) begin
                xv = (op < 2**N) ? N'(op) : N'($urandom);
                rs = (2*N)'(xv) * (2*N)'(xv);
                
                stop_at = ($urandom_range(0, 9) == 0) ? $urandom_range(0, ST_dser-2) : ST_dser;
                if (stop_at < ST_dser) n_restart++;
                start_dser = 1'b1;
                x_dser = xv[0];
                for (int k = 0; k < ST_dser; k++) begin
                    @(negedge clk);
                    chk(busy_dser === 1'b1 && step_dser === ($clog2(ST_dser))'(k), "dser step");
                    chk(y_valid_dser === 1'b1 && y_pair_dser === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]}, "dser pair");
                    chk(square_valid_dser === (k == ST_dser-1), "dser square_valid");
                    if (k == ST_dser-1) begin
                        chk(square_dser === rs[2*N-1:0], "dser square");
                        done_dser++;
                    end
                    if (k >= N) n_serial_msh++;
                    start_dser = 1'b0;
                    x_dser = (k+1 < N) ? xv[k+1] : 1'($urandom);
                    if (k == stop_at) break;
                end
                if (stop_at == ST_dser) begin
                    gap = $urandom_range(0, 2);
                    if (gap == 0) n_back_to_back++;
                    repeat (gap) begin
                        @(negedge clk);
                        chk(busy_dser === 1'b0, "dser idle");
                    end
                end
            end
            @(negedge clk);
        end
        begin : drv_col
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            int stop_at, gap;
            for (int op = 0; op < OPS; op++) begin
                xv = (op < 2**N) ? N'(op) : N'($urandom);
                rs = (2*N)'(xv) * (2*N)'(xv);
                
                stop_at = ($urandom_range(0, 9) == 0) ? $urandom_range(0, ST_col-2) : ST_col;
                if (stop_at < ST_col) n_restart++;
                start_col = 1'b1;
                x_col = xv[0];
                for (int k = 0; k < ST_col; k++) begin
                    @(negedge clk);
                    chk(busy_col === 1'b1 && step_col === ($clog2(ST_col))'(k), "col step");
                    if (k >= C0) begin
                        chk(y_valid_col === 1'b1 && y_pair_col === {rs[2*(k-C0)+1], rs[2*(k-C0)]}, "col pair");
                    end else begin
                        chk(y_valid_col === 1'b0, "col idle column step"); n_col_idle++;
                    end
                    chk(square_valid_col === (k == ST_col-1), "col square_valid");
                    if (k == ST_col-1) begin
                        chk(square_col === rs[2*N-1:0], "col square");
                        done_col++;
                    end
                    
                    start_col = 1'b0;
                    x_col = (k+1 < N) ? xv[k+1] : 1'($urandom);
                    if (k == stop_at) break;
                end
                if (stop_at == ST_col) begin
                    gap = $urandom_range(0, 2);
                    if (gap == 0) n_back_to_back++;
                    repeat (gap) begin
                        @(negedge clk);
                        chk(busy_col === 1'b0, "col idle");
                    end
                end
            end
            @(negedge clk);
        end
        begin : drv_text
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            int stop_at, gap;
            for (int op = 0; op < OPS; op++) begin
                xv = (op < 2**N) ? N'(op) : N'($urandom);
                begin logic signed [N-1:0] xs; xs = xv; rs = (2*N)'(xs * xs); end
                if (xv[N-1]) n_negative++; if (xv == {1'b1, {(N-1){1'b0}}}) n_xmin++;
                stop_at = ($urandom_range(0, 9) == 0) ? $urandom_range(0, ST_text-2) : ST_text;
                if (stop_at < ST_text) n_restart++;
                start_text = 1'b1;
                x_text = xv[0];
                for (int k = 0; k < ST_text; k++) begin
                    @(negedge clk);
                    chk(busy_text === 1'b1 && step_text === ($clog2(ST_text))'(k), "text step");
                    chk(y_valid_text === 1'b1 && y_pair_text === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]}, "text pair");
                    chk(square_valid_text === (k == ST_text-1), "text square_valid");
                    if (k == ST_text-1) begin
                        chk(square_text === rs[2*N-1-1:0], "text square");
                        done_text++;
                    end
                    if (k >= N) n_shift_one++;
                    start_text = 1'b0;
                    x_text = (k+1 < N) ? xv[k+1] : 1'($urandom);
                    if (k == stop_at) break;
                end
                if (stop_at == ST_text) begin
                    gap = $urandom_range(0, 2);
                    if (gap == 0) n_back_to_back++;
                    repeat (gap) begin
                        @(negedge clk);
                        chk(busy_text === 1'b0, "text idle");
                    end
                end
            end
            @(negedge clk);
        end
        begin : drv_tneg
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            int stop_at, gap;
            for (int op = 0; op < OPS; op++) begin
                xv = (op < 2**N) ? N'(op) : N'($urandom);
                begin logic signed [N-1:0] xs; xs = xv; rs = (2*N)'(xs * xs); end
                if (xv[N-1]) n_negative++; if (xv == {1'b1, {(N-1){1'b0}}}) n_xmin++;
                stop_at = ($urandom_range(0, 9) == 0) ? $urandom_range(0, ST_tneg-2) : ST_tneg;
                if (stop_at < ST_tneg) n_restart++;
                start_tneg = 1'b1;
                x_tneg = xv[0];
                for (int k = 0; k < ST_tneg; k++) begin
                    @(negedge clk);
                    chk(busy_tneg === 1'b1 && step_tneg === ($clog2(ST_tneg))'(k), "tneg step");
                    chk(y_valid_tneg === 1'b1 && y_pair_tneg === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]}, "tneg pair");
                    chk(square_valid_tneg === (k == ST_tneg-1), "tneg square_valid");
                    if (k == ST_tneg-1) begin
                        chk(square_tneg === rs[2*N-1-1:0], "tneg square");
                        done_tneg++;
                    end
                    if (k == N-1 && xv[N-1]) n_complement++; if (k == N-1) n_parallel_msh++;
                    start_tneg = 1'b0;
                    x_tneg = (k+1 < N) ? xv[k+1] : 1'($urandom);
                    if (k == stop_at) break;
                end
                if (stop_at == ST_tneg) begin
                    gap = $urandom_range(0, 2);
                    if (gap == 0) n_back_to_back++;
                    repeat (gap) begin
                        @(negedge clk);
                        chk(busy_tneg === 1'b0, "tneg idle");
                    end
                end
            end
            @(negedge clk);
        end
        join
        seen(done_dcpa, "dcpa operations completed");
        seen(done_dcsa, "dcsa operations completed");
        seen(done_dser, "dser operations completed");
        seen(done_col, "col operations completed");
        seen(done_text, "text operations completed");
        seen(done_tneg, "tneg operations completed");
        seen(n_back_to_back, "back-to-back operations");
        seen(n_restart, "restarts in mid-operation");
        seen(n_parallel_msh, "upper half in parallel");
        seen(n_serial_msh, "upper half bits serially");
        seen(n_col_idle, "column scheme idle steps");
        seen(n_shift_one, "shift-by-one steps");
        seen(n_complement, "complemented diagonals");
        seen(n_negative, "negative operands");
        seen(n_xmin, "most negative operand");
        seen(n_csa_carry, "carry-save carries held");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
