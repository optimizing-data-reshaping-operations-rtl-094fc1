// vec_ram: on-chip buffer read by a stream of addresses (the Read primitive).
//
// A simple dual-port memory of DEPTH words of WIDTH bits. The read side takes
// one address per cycle with a valid bit and a side-band tag, and returns the
// word one cycle later together with the delayed valid and tag: the
// one-cycle memory access the document uses in its pipeline examples. The
// write side fills the buffer one word per cycle (tile loading). The word
// width is meant to equal the width the compute side consumes per cycle, so
// no stream/vector conversion sits between memory and compute.
//
// The read latency of one cycle follows the document's example; the
// dual-port organisation, the tag and the write port are this design's own.
// Contents are not reset; they are valid once written.
module vec_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 16384,
  parameter int unsigned TAG_W = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // read request
  input  logic             rd_valid,
  input  logic [AW-1:0]    rd_addr,
  input  logic [TAG_W-1:0] rd_tag,
  // read response, one cycle later
  output logic             rsp_valid,
  output logic [WIDTH-1:0] rsp_data,
  output logic [TAG_W-1:0] rsp_tag
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_valid) rsp_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_tag   <= '0;
    end else begin
      rsp_valid <= rd_valid;
      rsp_tag   <= rd_tag;
    end
  end

endmodule
