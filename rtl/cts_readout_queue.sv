// cts_readout_queue: FIFO of readout tokens between the two state machines.
//
// The trigger distribution FSM pushes one 32-bit token per accepted event;
// the readout FSM reads the oldest token and pops it once the readout of
// that event is done. The default depth of 512 tokens is the capacity of a
// single 18 kbit two-port RAM block, as proposed by the design. The memory is
// a plain array with one write and one read port, a read and a write pointer
// and an occupancy counter that also drives the status register 0xa007
// (words enqueued 15:0, empty 30, full 31).
//
// Timing: a push is stored at the clock edge; the head token (dout) is read
// combinationally from the array, so it is valid in the cycle after the
// push that made the queue non-empty. Push while full and pop while empty
// are ignored (and flagged by assertions).
module cts_readout_queue #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [15:0]      count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      used;
  logic             do_push, do_pop;

  assign empty   = (used == '0);
  assign full    = (32'(used) == DEPTH);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign count   = 16'(used);
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      used   <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      used <= used + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
