// model_loader: the model memory's BRAM write FSM.
//
// Collects received bytes into memory entries: 5 bytes for an index entry
// (36 bits used) and 12 bytes for a position, normal or material entry (three
// floats). Bytes arrive least significant first (byte order is this design's
// choice). Each complete entry is written at the next address of the current
// target. An entry whose bits are all ones is the stop word: it is written
// too (in the index buffer it marks the end of the model) and the FSM moves
// to the next target, in the order indices, positions, normals, materials,
// then back to indices, with the address reset to zero.
module model_loader (
  input  logic        clk,
  input  logic        rst,
  input  logic        byte_valid,
  input  logic [7:0]  byte_in,
  output logic        we,
  output logic [1:0]  target,     // 0 index, 1 position, 2 normal, 3 material
  output logic [13:0] addr,
  output logic [95:0] wdata
);
  logic [95:0] shreg;
  logic [3:0]  nbytes;
  logic [13:0] addr_q;
  logic [1:0]  target_q;

  logic [3:0]  need;
  logic [95:0] entry;
  logic        stop;
  assign need = (target_q == 2'd0) ? 4'd5 : 4'd12;

  always_comb begin
    // entry as it will be once this byte is in
    entry = {byte_in, shreg[95:8]};
    if (target_q == 2'd0) entry = {56'd0, entry[95:56]};
    stop  = (target_q == 2'd0) ? (entry[35:0] == '1) : (entry == '1);
  end

  always_ff @(posedge clk) begin
    we <= 1'b0;
    if (rst) begin
      nbytes   <= '0;
      addr_q   <= '0;
      target_q <= '0;
    end else if (byte_valid) begin
      shreg <= {byte_in, shreg[95:8]};
      if (nbytes == need - 1'b1) begin
        nbytes <= '0;
        we     <= 1'b1;
        target <= target_q;
        addr   <= addr_q;
        wdata  <= entry;
        if (stop) begin
          target_q <= target_q + 1'b1;
          addr_q   <= '0;
        end else begin
          addr_q <= addr_q + 1'b1;
        end
      end else begin
        nbytes <= nbytes + 1'b1;
      end
    end
  end
endmodule
