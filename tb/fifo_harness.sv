// fifo_harness: randomized, self-checking stimulus for one fifo instance.
//
// It drives the fifo with random reads, writes, data and search keys in
// alternating fill-biased and drain-biased phases, so that the buffer
// repeatedly runs full and empty, plus an occasional reset in mid-stream.
// Every cycle the outputs are compared with a reference queue model:
// wr_valid, rd_valid, rd_data (zero unless rd_valid), full, almost_full and
// the content search (hit and age of the oldest match). A short directed
// sequence at the start checks the one-cycle write-to-read latency.
//
// Inputs change on the falling clock edge and are checked just before the
// rising edge that acts on them. The harness counts how often each
// mechanism of the fifo happened; with COVER set, one that never happened
// counts as a failure. `done` rises when the run is over. The harness makes
// the clock; the fifo under test is instantiated next to it and connected
// by name.
module fifo_harness #(
    parameter int  SIZE        = 16,
    parameter int  WIDTH       = 32,
    parameter int  ALERT_DEPTH = 3,
    parameter type T           = logic [WIDTH-1:0],
    parameter int  NOPS        = 2000,
    parameter bit  COVER       = 1'b1,
    parameter int  HALF_PERIOD = 5
) (
    output logic             clock,
    output logic             reset,
    output logic             wr_en,
    output logic             rd_en,
    output T                 wr_data,
    output T                 search_key,
    input  logic             wr_valid,
    input  logic             rd_valid,
    input  T                 rd_data,
    input  logic             almost_full,
    input  logic             full,
    input  logic             search_hit,
    input  logic [((SIZE > 1) ? $clog2(SIZE) : 1)-1:0] search_age,
    output bit               done,
    output int               checks,
    output int               failures
);
    localparam int W = $bits(T);

    initial clock = 1'b0;
    always #HALF_PERIOD clock = ~clock;

    logic [W-1:0] model [$];

    // Mechanism counters.
    int n_write, n_read, n_full_refused, n_empty_refused, n_rw_empty, n_rw_full;
    int n_full, n_almost_full, n_wrap, n_mid_reset, n_cam_hit, n_cam_old, n_cam_miss;
    int pushes_since_reset;

    function automatic logic [W-1:0] rand_word();
        logic [W-1:0] v = '0;
        for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
        return v;
    endfunction

    task automatic check(input bit ok, input string what);
        checks++;
        if (!ok) begin
            failures++;
            if (failures <= 10)
                $display("FAIL %s (SIZE=%0d W=%0d ALERT=%0d) at %0t",
                         what, SIZE, W, ALERT_DEPTH, $time);
        end
    endtask

    // Compare the outputs with the model for the inputs now applied, then
    // advance the model over the coming rising edge.
    task automatic check_and_step();
        int  sz = model.size();
        bit  exp_rv = rd_en && sz > 0;
        bit  exp_wv = wr_en && (sz < SIZE || rd_en);
        bit  exp_hit = 1'b0;
        int  exp_age = 0;
        for (int i = 0; i < sz; i++)
            if (model[i] == W'(search_key)) begin
                exp_hit = 1'b1;
                exp_age = i;
                break;
            end
        check(rd_valid == exp_rv, "rd_valid");
        check(wr_valid == exp_wv, "wr_valid");
        check(W'(rd_data) == (exp_rv ? model[0] : '0), "rd_data");
        check(full == (sz == SIZE), "full");
        check(almost_full == (SIZE - sz == ALERT_DEPTH), "almost_full");
        check(search_hit == exp_hit, "search_hit");
        check(int'(search_age) == exp_age, "search_age");

        if (rd_en && sz == 0) n_empty_refused++;
        if (wr_en && sz == SIZE && !rd_en) n_full_refused++;
        if (rd_en && wr_en && sz == 0) n_rw_empty++;
        if (rd_en && wr_en && sz == SIZE) n_rw_full++;
        if (sz == SIZE) n_full++;
        if (SIZE - sz == ALERT_DEPTH) n_almost_full++;
        if (exp_hit) n_cam_hit++; else n_cam_miss++;
        if (exp_hit && exp_age > 0) n_cam_old++;

        if (reset) begin
            if (sz > 0) n_mid_reset++;
            model.delete();
            pushes_since_reset = 0;
        end else begin
            if (exp_rv) begin
                void'(model.pop_front());
                n_read++;
            end
            if (exp_wv) begin
                model.push_back(W'(wr_data));
                n_write++;
                pushes_since_reset++;
                if (pushes_since_reset == SIZE + 1) n_wrap++;
            end
        end
    endtask

    task automatic cycle();
        #1 check_and_step();
        @(negedge clock);
    endtask

    task automatic idle_inputs();
        wr_en = 1'b0;
        rd_en = 1'b0;
        wr_data = T'(rand_word());
        search_key = T'(rand_word());
    endtask

    int fill_bias;
    bit reset_pending = 1'b0;

    initial begin
        done = 1'b0;
        checks = 0;
        failures = 0;
        pushes_since_reset = 0;
        idle_inputs();
        reset = 1'b1;
        // Initial reset: the state before it is unknown, so nothing is checked.
        @(negedge clock);
        @(negedge clock);
        reset = 1'b0;

        // Directed: one write to the empty buffer with a read in the same
        // cycle (refused), then the data must be readable one cycle later.
        wr_en = 1'b1;
        rd_en = 1'b1;
        cycle();
        wr_en = 1'b0;
        wr_data = T'(rand_word());
        cycle();
        check(model.size() == 0, "one-cycle latency drain");

        // Random phases.
        fill_bias = 80;
        for (int op = 0; op < NOPS; op++) begin
            if (op % (4 * SIZE + 8) == 0) fill_bias = (fill_bias == 80) ? 20 : 80;
            wr_en = ($urandom % 100) < fill_bias;
            rd_en = ($urandom % 100) < (100 - fill_bias);
            if ($urandom % 4 == 0) begin
                wr_en = 1'b1;
                rd_en = 1'b1;
            end
            wr_data = T'(rand_word());
            if (model.size() > 0 && $urandom % 2 == 0)
                search_key = T'(model[$urandom % model.size()]);
            else
                search_key = T'(rand_word());
            // A reset in mid-stream, taken at the first cycle from op 500
            // on (and every 997 ops) when the buffer holds data.
            if (op % 997 == 500) reset_pending = 1'b1;
            reset = reset_pending && model.size() > 0;
            if (reset) reset_pending = 1'b0;
            cycle();
        end
        reset = 1'b0;
        idle_inputs();
        cycle();

        if (COVER) begin
            check(n_write > 0, "coverage: write");
            check(n_read > 0, "coverage: read");
            check(n_full_refused > 0, "coverage: write refused when full");
            check(n_empty_refused > 0, "coverage: read refused when empty");
            check(n_rw_empty > 0, "coverage: read+write on empty");
            check(n_rw_full > 0, "coverage: read+write on full");
            check(n_full > 0, "coverage: full");
            check(ALERT_DEPTH > SIZE || n_almost_full > 0, "coverage: almost_full");
            check(n_wrap > 0, "coverage: pointer wrap");
            check(NOPS < 1000 || n_mid_reset > 0, "coverage: reset while not empty");
            check(n_cam_hit > 0, "coverage: search hit");
            check(SIZE < 2 || n_cam_old > 0, "coverage: search hit behind head");
            check(W < 8 || n_cam_miss > 0, "coverage: search miss");
        end
        $display("fifo SIZE=%0d W=%0d ALERT=%0d: writes=%0d reads=%0d full_refused=%0d empty_refused=%0d rw_empty=%0d rw_full=%0d full=%0d almost_full=%0d wraps=%0d mid_resets=%0d cam_hit=%0d cam_miss=%0d",
                 SIZE, W, ALERT_DEPTH, n_write, n_read, n_full_refused, n_empty_refused,
                 n_rw_empty, n_rw_full, n_full, n_almost_full, n_wrap, n_mid_reset,
                 n_cam_hit, n_cam_miss);
        done = 1'b1;
    end

endmodule
