// fifo_bench: one fifo instance of the given configuration, driven and
// checked by fifo_harness. Used by the configuration sweep.
module fifo_bench #(
    parameter int  SIZE        = 16,
    parameter int  WIDTH       = 32,
    parameter int  ALERT_DEPTH = 3,
    parameter type T           = logic [WIDTH-1:0],
    parameter int  NOPS        = 2000
) (
    output bit done,
    output int checks,
    output int failures
);
    localparam int PTR_W = (SIZE > 1) ? $clog2(SIZE) : 1;

    logic             clock, reset, wr_en, rd_en;
    T                 wr_data, rd_data, search_key;
    logic             wr_valid, rd_valid, almost_full, full, search_hit;
    logic [PTR_W-1:0] search_age;

    fifo #(.SIZE(SIZE), .WIDTH(WIDTH), .ALERT_DEPTH(ALERT_DEPTH), .T(T)) dut (.*);

    fifo_harness #(.SIZE(SIZE), .WIDTH(WIDTH), .ALERT_DEPTH(ALERT_DEPTH), .T(T), .NOPS(NOPS)) h (.*);
endmodule
