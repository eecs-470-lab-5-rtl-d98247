// tb_fifo_cam: checks the content search on its own. Random storage
// contents (drawn from a small value set so that keys often appear several
// times), random head position and live-entry count, and keys taken from
// the array or drawn at random are applied; hit and age are compared with a
// straightforward age-order scan done here. Directed cases cover an empty
// window, a full window wrapping around the end of the array, and a match
// lying just outside the live window, which must not count.
module tb_fifo_cam;
    localparam int SIZE  = 12;   // not a power of two, to exercise the wrap
    localparam int WIDTH = 8;
    localparam int PTR_W = $clog2(SIZE);
    localparam int CNT_W = $clog2(SIZE + 1);

    logic [WIDTH-1:0] entries [SIZE];
    logic [PTR_W-1:0] head;
    logic [CNT_W-1:0] count;
    logic [WIDTH-1:0] key;
    logic             hit;
    logic [PTR_W-1:0] age;

    int checks = 0, failures = 0;
    int n_hit = 0, n_miss = 0, n_wrapped_hit = 0;
    bit finished = 1'b0;

    fifo_cam #(.SIZE(SIZE), .WIDTH(WIDTH)) dut (.*);

    task automatic apply_and_check();
        bit exp_hit = 1'b0;
        int exp_age = 0;
        #1;
        for (int i = 0; i < int'(count); i++)
            if (entries[(int'(head) + i) % SIZE] == key) begin
                exp_hit = 1'b1;
                exp_age = i;
                break;
            end
        checks++;
        if (hit !== exp_hit || (exp_hit && int'(age) != exp_age) || (!exp_hit && age != '0)) begin
            failures++;
            if (failures <= 10)
                $display("FAIL head=%0d count=%0d key=%0h: hit=%0b age=%0d, expected %0b %0d",
                         head, count, key, hit, age, exp_hit, exp_age);
        end
        if (exp_hit) n_hit++; else n_miss++;
        if (exp_hit && int'(head) + exp_age >= SIZE) n_wrapped_hit++;
    endtask

    initial begin
        // Empty window: never a hit, even if the key is stored.
        foreach (entries[i]) entries[i] = 8'h55;
        head = 4'd3; count = '0; key = 8'h55;
        apply_and_check();
        checks++; if (hit) failures++;

        // Full window wrapping: the only match is at the last array slot
        // before the wrap, head at 7.
        foreach (entries[i]) entries[i] = WIDTH'(i);
        head = 4'd7; count = CNT_W'(SIZE); key = WIDTH'(2);
        apply_and_check();
        checks++; if (!hit || age != PTR_W'(SIZE - 7 + 2)) failures++;

        // A match just past the live window is not reported.
        head = 4'd0; count = 4'd5; key = WIDTH'(5);
        apply_and_check();
        checks++; if (hit) failures++;

        // Two matches: the older one wins.
        foreach (entries[i]) entries[i] = 8'h00;
        entries[10] = 8'hAA; entries[1] = 8'hAA;
        head = 4'd9; count = 4'd6; key = 8'hAA;
        apply_and_check();
        checks++; if (!hit || age != 4'd1) failures++;

        // Random cases.
        for (int n = 0; n < 3000; n++) begin
            foreach (entries[i]) entries[i] = WIDTH'($urandom % 6);
            head  = PTR_W'($urandom % SIZE);
            count = CNT_W'($urandom % (SIZE + 1));
            key   = WIDTH'($urandom % 8);
            apply_and_check();
        end

        checks++;
        if (n_hit == 0 || n_miss == 0 || n_wrapped_hit == 0) begin
            failures++;
            $display("FAIL coverage: hits=%0d misses=%0d wrapped=%0d", n_hit, n_miss, n_wrapped_hit);
        end
        finished = 1'b1;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    // Watchdog (combinational block, counted in 1-unit steps).
    initial begin
        #100_000;
        if (!finished) begin
            $display("watchdog: timeout");
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
            $finish;
        end
    end
endmodule
