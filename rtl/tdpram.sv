// tdpram: true dual-port RAM, the shared memory of the ComBlock.
//
// Two independent ports, A and B, each with its own clock, enable, write enable, address and
// data; both may read and write. A port with en high writes wdata at the clock edge when we is
// high, and in every enabled cycle registers the word at addr onto rdata (read-before-write: a
// write returns the old contents). Writes of both ports to one address in the same cycle leave
// that word undefined, as in vendor block RAM.
// In the ComBlock port A faces the FPGA fabric and port B the processor. The depth is this
// design's choice (1024 words, one 36-kbit block); the architecture gives none.
// Lint reports the array as driven from two blocks with different clocks. That stands: it is
// what a true dual-port RAM is, and synthesis maps it onto a dual-port block RAM.
module tdpram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk_a,
  input  logic                     en_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         wdata_a,
  output logic [WIDTH-1:0]         rdata_a,
  input  logic                     clk_b,
  input  logic                     en_b,
  input  logic                     we_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic [WIDTH-1:0]         wdata_b,
  output logic [WIDTH-1:0]         rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      if (we_a) mem[addr_a] <= wdata_a;
      rdata_a <= mem[addr_a];
    end
  end

  always_ff @(posedge clk_b) begin
    if (en_b) begin
      if (we_b) mem[addr_b] <= wdata_b;
      rdata_b <= mem[addr_b];
    end
  end

endmodule
