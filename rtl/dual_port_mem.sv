// dual_port_mem: true dual-port word memory between the Hertz and Fastsim sides.
//
// The Hertz processor (CPU0) leaves the contact-patch sizes and inputs here for the first
// Fastsim processor (CPU1) and collects the contact forces from it. The document names the
// memory and its two users; its size, its synchronous read and the collision rule are this
// design's choices. Each port reads and writes independently in every cycle.
//
// Interface, per port (a and b): `en` selects the port for this cycle, `we` makes it a
// write of `wdata` to `addr`; a read returns the word on `rdata` one cycle later. When both
// ports write the same word in the same cycle, port a's data is kept. A read of a word
// being written in the same cycle by the other port returns the old contents.
module dual_port_mem #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
  end

endmodule
