// tb_fifo: end-to-end test of the fifo at its default configuration
// (16 entries of 32 bits, alert depth 3), instantiated without overrides.
// The randomized harness compares every output with a reference queue and
// requires each mechanism (refused write when full, refused read when
// empty, simultaneous read and write on an empty and on a full buffer,
// almost_full, pointer wrap, reset in mid-stream, search hit and miss) to
// happen at least once. The bound assertion checker watches the same
// instance independently; any violation it saw counts as one failure.
module tb_fifo;
    logic        clock, reset, wr_en, rd_en;
    logic [31:0] wr_data, rd_data, search_key;
    logic        wr_valid, rd_valid, almost_full, full, search_hit;
    logic [3:0]  search_age;
    bit done;
    int checks, failures;

    fifo dut (.*);

    fifo_harness #(.NOPS(3000)) h (.*);

    bind fifo fifo_sva #(.SIZE(SIZE), .ALERT_DEPTH(ALERT_DEPTH), .W($bits(T))) u_sva (
        .clock, .reset, .wr_en, .rd_en, .wr_valid, .rd_valid, .full, .almost_full,
        .rd_data(rd_data)
    );

    initial begin
        wait (done);
        checks++;
        if (dut.u_sva.errors != 0) failures++;
        $display("assertion checker: %0d violations", dut.u_sva.errors);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    // Watchdog: the run needs about 3000 cycles.
    initial begin
        repeat (20_000) @(posedge clock);
        $display("watchdog: timeout");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
        $finish;
    end
endmodule
