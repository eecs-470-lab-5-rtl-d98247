// tb_fifo_configs: runs the randomized fifo harness on several sizes and
// widths side by side, the way the lab's check script sweeps them: a single
// entry, power-of-two and non-power-of-two depths (5, 16, 32, 48), widths of
// 1, 8, 32 and 64 bits, alert depths of 0, 1, 3 and one beyond the size,
// and a fifo holding a packed struct through its type parameter. Each
// configuration is a fifo_bench (fifo plus harness); the bound assertion
// checker watches every instance.
module tb_fifo_configs;
    typedef struct packed {
        logic [5:0]  tag;
        logic        last;
        logic [15:0] payload;
    } packet_t;

    localparam int N = 8;
    bit done [N];
    int checks [N];
    int failures [N];

    fifo_bench #(.SIZE(1),  .WIDTH(8),  .ALERT_DEPTH(0), .NOPS(1200)) h0 (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
    fifo_bench #(.SIZE(5),  .WIDTH(1),  .ALERT_DEPTH(1), .NOPS(1200)) h1 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
    fifo_bench #(.SIZE(16), .WIDTH(32), .ALERT_DEPTH(0), .NOPS(1500)) h2 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
    fifo_bench #(.SIZE(32), .WIDTH(8),  .ALERT_DEPTH(3), .NOPS(2500)) h3 (.done(done[3]), .checks(checks[3]), .failures(failures[3]));
    fifo_bench #(.SIZE(48), .WIDTH(64), .ALERT_DEPTH(3), .NOPS(3000)) h4 (.done(done[4]), .checks(checks[4]), .failures(failures[4]));
    fifo_bench #(.SIZE(7),  .WIDTH(16), .ALERT_DEPTH(7), .NOPS(1200)) h5 (.done(done[5]), .checks(checks[5]), .failures(failures[5]));
    fifo_bench #(.SIZE(4),  .WIDTH(8),  .ALERT_DEPTH(9), .NOPS(1200)) h6 (.done(done[6]), .checks(checks[6]), .failures(failures[6]));
    fifo_bench #(.SIZE(6),  .T(packet_t), .ALERT_DEPTH(2), .NOPS(1500)) h7 (.done(done[7]), .checks(checks[7]), .failures(failures[7]));

    bind fifo fifo_sva #(.SIZE(SIZE), .ALERT_DEPTH(ALERT_DEPTH), .W($bits(T))) u_sva (
        .clock, .reset, .wr_en, .rd_en, .wr_valid, .rd_valid, .full, .almost_full,
        .rd_data(rd_data)
    );

    int total_checks = 0, total_failures = 0;
    int sva_errors;

    initial begin
        wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7]);
        sva_errors = h0.dut.u_sva.errors + h1.dut.u_sva.errors + h2.dut.u_sva.errors
                   + h3.dut.u_sva.errors + h4.dut.u_sva.errors + h5.dut.u_sva.errors
                   + h6.dut.u_sva.errors + h7.dut.u_sva.errors;
        for (int i = 0; i < N; i++) begin
            total_checks   += checks[i];
            total_failures += failures[i];
        end
        total_checks++;
        if (sva_errors != 0) total_failures++;
        $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
        $finish;
    end

    // Watchdog: the longest run needs about 3000 cycles.
    initial begin
        repeat (20_000) @(posedge h0.clock);
        $display("watchdog: timeout");
        $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
        $finish;
    end
endmodule
