// cache_way: one set of the 8051 code cache (the 'cache' component).
// Each row holds a valid bit, a tag and a block of NBYTES code bytes. A read
// is synchronous: rd_en with rd_index loads the row into an output register
// on the rising clock edge, and in the following cycle 'hit' is the AND of the
// valid bit with the comparison of the stored tag and cmp_tag, while 'block'
// presents the whole row for the byte multiplexer outside. The direct-mapped
// cache uses one instance, the 2-way cache two. Rows are written whole (refill
// or flush, we_row) or one byte at a time (memory mode, we_byte).
// The row SRAM is clocked on the rising edge here (the original cache SRAM
// used the falling edge); the cache controller spends one wait cycle per
// access, so the hit time stays two cycles.
module cache_way #(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned TAG_W  = 7,
  parameter int unsigned NBYTES = 8,
  localparam int unsigned IDX_W = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned OFF_W = (NBYTES > 1) ? $clog2(NBYTES) : 1
) (
  input  logic                   clk,
  // read port
  input  logic                   rd_en,
  input  logic [IDX_W-1:0]       rd_index,
  input  logic [TAG_W-1:0]       cmp_tag,
  output logic                   valid,
  output logic [TAG_W-1:0]       tag,
  output logic [NBYTES*8-1:0]    block,
  output logic                   hit,
  // whole-row write port (refill, flush)
  input  logic                   we_row,
  input  logic [IDX_W-1:0]       wr_index,
  input  logic                   wr_valid,
  input  logic [TAG_W-1:0]       wr_tag,
  input  logic [NBYTES*8-1:0]    wr_block,
  // single-byte write port (memory mode)
  input  logic                   we_byte,
  input  logic [OFF_W-1:0]       wr_offset,
  input  logic [7:0]             wr_byte
);
  typedef struct packed {
    logic                v;
    logic [TAG_W-1:0]    tag;
    logic [NBYTES*8-1:0] blk;
  } row_t;

  row_t mem [ROWS];
  row_t rd_q;

  always_ff @(posedge clk) begin
    if (we_row)
      mem[wr_index] <= '{v: wr_valid, tag: wr_tag, blk: wr_block};
    else if (we_byte)
      mem[wr_index].blk[wr_offset*8 +: 8] <= wr_byte;
    if (rd_en)
      rd_q <= mem[rd_index];
  end

  assign valid = rd_q.v;
  assign tag   = rd_q.tag;
  assign block = rd_q.blk;
  assign hit   = rd_q.v && (rd_q.tag == cmp_tag);
endmodule
