// prim_fifo: the primitive FIFO between the vertex transform and the
// rasterizer.
//
// Stores DEPTH (8192) screen-space vertices (96 bits) with their material
// and normal indices (12 bits each) in three memories sharing one write
// pointer and one read pointer. The transform side cannot be stalled: a
// vertex is written whenever valid_in is high; a write into a full FIFO is
// lost and sets the sticky `overflow` flag. The read side is first-word-fall-
// through with valid/ready: the memory is read synchronously into an output
// register, which costs one cycle per vertex, well below the rate at which
// the rasterizer consumes vertices (at least three cycles each).
module prim_fifo
  import gfx_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   valid_in,
  input  fvec3_t vertex_in,
  input  attr_t  attr_in,
  output logic   valid_out,
  input  logic   ready,
  output fvec3_t vertex_out,
  output attr_t  attr_out,
  output logic   empty,
  output logic   overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [95:0] pos_mem [DEPTH];
  logic [11:0] mat_mem [DEPTH];
  logic [11:0] nrm_mem [DEPTH];

  logic [AW:0] wr_ptr, rd_ptr;
  logic        full, mem_empty, rd_pend, rd_issue;

  assign mem_empty = (wr_ptr == rd_ptr);
  assign full      = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  // refill the output register when it is empty or being consumed
  assign rd_issue  = !mem_empty && !rd_pend && (!valid_out || ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      rd_pend   <= 1'b0;
      valid_out <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      if (valid_in) begin
        if (full) overflow <= 1'b1;
        else      wr_ptr   <= wr_ptr + 1'b1;
      end
      if (valid_out && ready) valid_out <= 1'b0;
      if (rd_pend) valid_out <= 1'b1;
      rd_pend <= rd_issue;
      if (rd_issue) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (valid_in && !full) begin
      pos_mem[wr_ptr[AW-1:0]] <= vertex_in;
      mat_mem[wr_ptr[AW-1:0]] <= attr_in.material;
      nrm_mem[wr_ptr[AW-1:0]] <= attr_in.normal;
    end
  end

  logic [95:0] pos_rd;
  logic [11:0] mat_rd, nrm_rd;
  always_ff @(posedge clk) begin
    pos_rd <= pos_mem[rd_ptr[AW-1:0]];
    mat_rd <= mat_mem[rd_ptr[AW-1:0]];
    nrm_rd <= nrm_mem[rd_ptr[AW-1:0]];
    if (rd_pend) begin
      vertex_out <= fvec3_t'(pos_rd);
      attr_out   <= '{material: mat_rd, normal: nrm_rd};
    end
  end

  assign empty = mem_empty && !rd_pend && !valid_out;
endmodule
