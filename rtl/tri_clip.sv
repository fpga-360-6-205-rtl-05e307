// tri_clip: removes every triangle that has a vertex outside the clip volume.
//
// A vertex is inside when w > 0 and |x|, |y| and |z| are all at most w (a
// magnitude comparison of the float bit patterns). Vertices arrive in
// triangle order; the first two of each triangle wait in a buffer, and when
// the third arrives the whole triangle is moved to an output buffer and sent
// on over the next three cycles, or dropped if any vertex was outside. No
// new triangles are formed at the boundary. Since a triangle needs at least
// three input cycles, the output buffer is always free when the next one
// completes, so input is accepted every cycle. Latency: 1 to 3 cycles after
// the triangle's last vertex.
module tri_clip
  import gfx_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   valid_in,
  input  fvec4_t vertex,
  input  attr_t  attr_in,
  output logic   valid_out,
  output fvec4_t vertex_out,
  output attr_t  attr_out,
  output logic   dropped        // one-cycle pulse per clipped triangle
);
  function automatic logic in_volume(input fvec4_t v);
    return !v.w[31] && v.w[30:0] != 0 &&
           v.x[30:0] <= v.w[30:0] && v.y[30:0] <= v.w[30:0] && v.z[30:0] <= v.w[30:0];
  endfunction

  fvec4_t     in_buf   [2];
  attr_t      in_attr  [2];
  logic [1:0] in_ok;
  logic [1:0] n_in;
  fvec4_t     out_buf  [3];
  attr_t      out_attr [3];
  logic [1:0] n_out, out_idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      n_in    <= '0;
      n_out   <= '0;
      out_idx <= '0;
      dropped <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (n_out != 0) begin
        n_out   <= n_out - 1'b1;
        out_idx <= out_idx + 1'b1;
      end
      if (valid_in) begin
        if (n_in == 2'd2) begin
          n_in <= '0;
          out_buf  <= '{in_buf[0], in_buf[1], vertex};
          out_attr <= '{in_attr[0], in_attr[1], attr_in};
          out_idx  <= '0;
          if (&in_ok && in_volume(vertex)) n_out <= 2'd3;
          else begin
            n_out   <= '0;
            dropped <= 1'b1;
          end
        end else begin
          in_buf[n_in[0]]  <= vertex;
          in_attr[n_in[0]] <= attr_in;
          in_ok[n_in[0]]   <= in_volume(vertex);
          n_in <= n_in + 1'b1;
        end
      end
    end
  end

  assign valid_out  = (n_out != 0);
  assign vertex_out = out_buf[out_idx];
  assign attr_out   = out_attr[out_idx];
endmodule
