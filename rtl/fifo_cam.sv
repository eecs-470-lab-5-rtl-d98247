// fifo_cam: content search (CAM lookup) over the live entries of a circular
// FIFO buffer.
//
// The buffer's storage array, head pointer and entry count are given. The
// search walks the entries in age order, starting at the head (the oldest
// entry, the next to be read) and wrapping around the end of the array, and
// takes the first entry equal to `key` that lies within the `count` live
// entries. Entries outside the live window (already read or never written)
// are never matched.
//
// Interface:
//   entries  storage array of the buffer, SIZE elements of type T
//   head     index of the oldest entry
//   count    number of live entries (0..SIZE)
//   key      value looked for
//   hit      1 when a live entry equals key
//   age      distance of the oldest matching entry from the head
//            (0 = the entry at the head); 0 when there is no hit
//
// Timing: purely combinational, no clock. The search is a priority scan
// written as a loop that stops taking matches after the first one, the
// hardware form of the "loop with a break" the lab's bonus feature
// suggests; the oldest-match priority and the age output are this design's
// own choices.
module fifo_cam #(
    parameter int  SIZE  = 16,
    parameter int  WIDTH = 32,
    parameter type T     = logic [WIDTH-1:0],
    localparam int PTR_W = (SIZE > 1) ? $clog2(SIZE) : 1,
    localparam int CNT_W = $clog2(SIZE + 1)
) (
    input  T                 entries [SIZE],
    input  logic [PTR_W-1:0] head,
    input  logic [CNT_W-1:0] count,
    input  T                 key,
    output logic             hit,
    output logic [PTR_W-1:0] age
);

    // Array index of the entry i places behind the head, wrapping at SIZE.
    function automatic int unsigned slot(input logic [PTR_W-1:0] h, input int i);
        int unsigned p = int'(h) + i;
        return (p >= SIZE) ? p - SIZE : p;
    endfunction

    // Priority scan, oldest entry first. `hit` doubles as the "stop" flag of
    // the loop: once set, later entries are ignored, which is what a break
    // at the first match does in software.
    always_comb begin
        hit = 1'b0;
        age = '0;
        for (int i = 0; i < SIZE; i++) begin
            if (!hit && i < int'(count) && entries[slot(head, i)] == key) begin
                hit = 1'b1;
                age = PTR_W'(i);
            end
        end
    end

endmodule
