// sync_fifo: single-clock first-in first-out buffer, one per direction inside the ComBlock.
//
// DEPTH entries of WIDTH bits. rdata shows the oldest entry whenever empty is low (first-word
// fall-through), and pop removes it at the clock edge. push stores wdata at the edge. A push when
// full and a pop when empty are ignored, and the caller sees them as overflow / underflow pulses
// in the same cycle. A push and a pop in one cycle both happen. clr empties the buffer.
// count holds the number of entries (0..DEPTH).
// Depth 32 is this design's choice: two 32-deep, 32-bit FIFOs fit in distributed RAM of about the
// size reported for the ComBlock; the architecture gives no depth. Both sides share one clock here.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     overflow,
  output logic                     underflow
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty     = (count == 0);
  assign full      = (count == CW'(DEPTH));
  assign do_push   = push & ~full;
  assign do_pop    = pop & ~empty;
  assign overflow  = push & full;
  assign underflow = pop & empty;
  assign rdata     = mem[rptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule
