// fifo: parameterized first-in first-out circular buffer.
//
// SIZE elements of type T (by default WIDTH-bit vectors) are kept in a
// register array used as a ring. A tail pointer marks where the next write
// goes and a head pointer marks the oldest entry, the one a read returns.
// Both pointers wrap from SIZE-1 back to 0, so SIZE need not be a power of
// two. Empty and full are told apart with an entry counter (empty when it is
// 0, full when it is SIZE), the simplest of the bookkeeping schemes the lab
// lists; this choice is this design's own.
//
// Interface (the lab's FIFO interface, plus a content-search port):
//   wr_en / wr_data   push request; wr_valid says in the same cycle whether
//                     it is taken. A write is refused only when the buffer
//                     is full and no read happens in the same cycle: a read
//                     and a write together on a full buffer both succeed.
//   rd_en             pop request; rd_valid says in the same cycle whether
//                     rd_data holds the oldest entry. A read of an empty
//                     buffer is refused even if a write arrives in the same
//                     cycle, so data needs at least one cycle to pass through.
//                     rd_data is all zeros whenever rd_valid is 0 (the lab's
//                     first bonus rule; the zero on a refused read is this
//                     design's choice).
//   full              no free space.
//   almost_full       exactly ALERT_DEPTH free spaces remain. With
//                     ALERT_DEPTH = 0 it equals full; with ALERT_DEPTH > SIZE
//                     it is never set.
//   search_key / search_hit / search_age
//                     combinational lookup of a value among the live
//                     entries (see fifo_cam); search_age counts from the
//                     head, 0 being the entry the next read returns.
//
// Timing: wr_valid, rd_valid, rd_data and the search outputs are
// combinational from the inputs and the current state; storage, pointers,
// counter, full and almost_full change only on the rising clock edge.
// reset is synchronous and active high; it empties the buffer (pointers and
// counter to 0) and leaves the stored data as it is, since no entry is read
// before it is written again.
//
// Storing a struct: T is a type parameter, so an instance can hold any
// packed type, e.g. fifo #(.T(my_packet_t)) without editing this file.
module fifo #(
    parameter int  SIZE        = 16,
    parameter int  WIDTH       = 32,
    parameter int  ALERT_DEPTH = 3,
    parameter type T           = logic [WIDTH-1:0],
    localparam int PTR_W       = (SIZE > 1) ? $clog2(SIZE) : 1,
    localparam int CNT_W       = $clog2(SIZE + 1)
) (
    input  logic             clock,
    input  logic             reset,
    input  logic             wr_en,
    input  logic             rd_en,
    input  T                 wr_data,
    output logic             wr_valid,
    output logic             rd_valid,
    output T                 rd_data,
    output logic             almost_full,
    output logic             full,
    input  T                 search_key,
    output logic             search_hit,
    output logic [PTR_W-1:0] search_age
);

    if (SIZE < 1) begin : g_size_check
        $error("fifo: SIZE must be at least 1");
    end

    T                 mem [SIZE];
    logic [PTR_W-1:0] head, tail;
    logic [CNT_W-1:0] count;
    logic             empty;

    // Next index around the ring (the lab's modulo step, written as a
    // compare so that it costs no divider for non-power-of-two sizes).
    function automatic logic [PTR_W-1:0] ring_next(input logic [PTR_W-1:0] p);
        return (int'(p) == SIZE - 1) ? '0 : p + 1'b1;
    endfunction

    assign empty       = (count == '0);
    assign full        = (int'(count) == SIZE);
    assign almost_full = (SIZE - int'(count) == ALERT_DEPTH);

    assign rd_valid = rd_en && !empty;
    assign wr_valid = wr_en && (!full || rd_en);
    assign rd_data  = rd_valid ? mem[head] : T'('0);

    // Storage: one write port (tail) and one read port (head).
    always_ff @(posedge clock) begin
        if (!reset && wr_valid) mem[tail] <= wr_data;
    end

    always_ff @(posedge clock) begin
        if (reset) begin
            head  <= '0;
            tail  <= '0;
            count <= '0;
        end else begin
            if (wr_valid) tail <= ring_next(tail);
            if (rd_valid) head <= ring_next(head);
            case ({wr_valid, rd_valid})
                2'b10:   count <= count + 1'b1;
                2'b01:   count <= count - 1'b1;
                default: count <= count;
            endcase
        end
    end

    fifo_cam #(.SIZE(SIZE), .WIDTH(WIDTH), .T(T)) u_cam (
        .entries(mem),
        .head   (head),
        .count  (count),
        .key    (search_key),
        .hit    (search_hit),
        .age    (search_age)
    );

    // Invariants: the counter never leaves 0..SIZE, the pointers stay
    // inside the ring, and the tail is count entries ahead of the head.
    always_ff @(posedge clock) begin
        if (!reset) begin
            a_count_range: assert (int'(count) <= SIZE);
            a_ptr_range:   assert (int'(head) < SIZE && int'(tail) < SIZE);
            a_ptr_gap:     assert ((int'(tail) - int'(head) + SIZE) % SIZE
                                   == int'(count) % SIZE);
        end
    end

endmodule
