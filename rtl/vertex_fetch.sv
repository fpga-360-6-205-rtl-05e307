// vertex_fetch: streams the model's vertices into the pipeline.
//
// On `restart` it reads the index buffer from address 0 upwards, one entry
// per cycle. Each index entry names a position, a normal and a material; the
// position index is used at once to read the position memory, and one cycle
// later the vertex leaves with its normal and material indices. The list ends
// at the first stop word (all ones) or at the end of the buffer; `done` goes
// high once the last vertex has left. Using the stop word as the end marker is
// this design's choice. Throughput is one vertex per cycle, latency from
// address to output three cycles (two memory reads and one register).
module vertex_fetch
  import gfx_pkg::*;
#(
  parameter int unsigned INDEX_DEPTH = 8196
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        restart,
  output logic [13:0] index_read_addr,
  input  index_t      index,
  output logic [10:0] position_read_addr,
  input  fvec3_t      position,
  output logic        valid_out,
  output fvec3_t      position_out,
  output attr_t       attr_out,
  output logic        done
);
  logic  running, stopped;
  logic  va, vb;        // index read in flight, position read in flight
  attr_t attr_b;

  assign position_read_addr = index.position[10:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      running         <= 1'b0;
      stopped         <= 1'b1;
      index_read_addr <= '0;
      va              <= 1'b0;
      vb              <= 1'b0;
      valid_out       <= 1'b0;
    end else begin
      if (restart) begin
        running         <= 1'b1;
        stopped         <= 1'b0;
        index_read_addr <= '0;
      end else if (running) begin
        if (32'(index_read_addr) == INDEX_DEPTH - 1) running <= 1'b0;
        index_read_addr <= index_read_addr + 1'b1;
      end
      va <= running && !restart;
      // index entry arrives: stop word ends the list
      if (va && !stopped && index == index_t'('1)) begin
        stopped <= 1'b1;
        running <= 1'b0;
      end
      vb        <= va && !stopped && index != index_t'('1) && !restart;
      valid_out <= vb;
    end
    attr_b       <= '{material: index.material, normal: index.normal};
    attr_out     <= attr_b;
    position_out <= position;
  end

  assign done = !running && !va && !vb && !valid_out;
endmodule
