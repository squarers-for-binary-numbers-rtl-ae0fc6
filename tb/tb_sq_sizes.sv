// Testbench that runs every squarer at the operand widths
// N = 3, 4, 5, 6, 7, 8, including the sign-extension squarer with the most
// negative operand excluded. Each width is checked exhaustively by an
// instance of sq_size_check; the totals are reported together.
module tb_sq_sizes;
    int c [6], f [6];
    bit d [6];
    int checks = 0, failures = 0;
    sq_size_check #(.N(3)) u_n3 (.checks(c[0]), .failures(f[0]), .done(d[0]));
    sq_size_check #(.N(4)) u_n4 (.checks(c[1]), .failures(f[1]), .done(d[1]));
    sq_size_check #(.N(5)) u_n5 (.checks(c[2]), .failures(f[2]), .done(d[2]));
    sq_size_check #(.N(6)) u_n6 (.checks(c[3]), .failures(f[3]), .done(d[3]));
    sq_size_check #(.N(7)) u_n7 (.checks(c[4]), .failures(f[4]), .done(d[4]));
    sq_size_check #(.N(8)) u_n8 (.checks(c[5]), .failures(f[5]), .done(d[5]));

    initial begin : watchdog
        #2000000;
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
        for (int i = 0; i < 6; i++) begin
            checks += c[i];
            failures += f[i];
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
