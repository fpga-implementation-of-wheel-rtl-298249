// sync_fifo: synchronous first-in first-out memory.
//
// Used for the FIFO memories that carry data from one Fastsim processor to the next around
// the processor ring, and inside every FPU to queue operands and results. The document
// only names these FIFOs; depth, width and the show-ahead read are this design's choices.
// Storage is a register array indexed by wrapping read and write pointers; an occupancy
// counter gives `full`, `empty` and `count`.
//
// Interface: `push` with `wdata` writes at the clock edge (ignored when full), `pop`
// removes the head (ignored when empty). `rdata` always shows the head (show-ahead), valid
// when `empty` is low. Pushing and popping in the same cycle is allowed in any state that
// is not empty/full for the operation concerned.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= incr(wp);
      if (do_pop)  rp <= incr(rp);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign rdata = mem[rp];

endmodule
