// fifo_sva: assertion checker for the fifo, attached to each fifo instance
// with a `bind` statement so that the checks stay out of the design file.
//
// It keeps its own occupancy count from the accepted reads and writes and
// checks, every cycle outside reset:
//   - a valid bit is only given for a request that was made;
//   - rd_valid is exactly "read requested and not empty";
//   - wr_valid is exactly "write requested and (not full or reading)";
//   - full and almost_full match the occupancy and ALERT_DEPTH;
//   - rd_data is zero whenever rd_en is 0;
//   - a read in the cycle after a reset is refused (the buffer is empty).
// Each violated rule adds one to `errors`, which the testbench reads at the
// end, and prints a message.
module fifo_sva #(
    parameter int SIZE        = 16,
    parameter int ALERT_DEPTH = 3,
    parameter int W           = 32
) (
    input logic         clock,
    input logic         reset,
    input logic         wr_en,
    input logic         rd_en,
    input logic         wr_valid,
    input logic         rd_valid,
    input logic         full,
    input logic         almost_full,
    input logic [W-1:0] rd_data
);

    int unsigned errors;
    int          occ;
    bit          known;        // occupancy is known once a reset was seen
    bit          prev_reset;

    initial begin
        errors     = 0;
        occ        = 0;
        known      = 1'b0;
        prev_reset = 1'b0;
    end

    task automatic fail(input string what);
        errors++;
        $display("fifo_sva: %s at %0t", what, $time);
    endtask

    always @(posedge clock) begin
        if (!reset && known) begin
            if (wr_valid && !wr_en) fail("wr_valid without wr_en");
            if (rd_valid && !rd_en) fail("rd_valid without rd_en");
            if (rd_valid != (rd_en && occ > 0)) fail("rd_valid wrong");
            if (wr_valid != (wr_en && (occ < SIZE || rd_en))) fail("wr_valid wrong");
            if (full != (occ == SIZE)) fail("full wrong");
            if (almost_full != (SIZE - occ == ALERT_DEPTH)) fail("almost_full wrong");
            if (!rd_en && rd_data != '0) fail("rd_data not zero without rd_en");
            if (prev_reset && rd_valid) fail("read valid right after reset");
        end
        prev_reset <= reset;
        if (reset) begin
            occ   <= 0;
            known <= 1'b1;
        end else begin
            occ <= occ + int'(wr_valid) - int'(rd_valid);
        end
    end

endmodule
