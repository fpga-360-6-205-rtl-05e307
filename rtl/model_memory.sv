// model_memory: holds the model being rendered and loads it over UART.
//
// Four memories: the index buffer (INDEX_DEPTH x 36 bits, three 12-bit
// indices per vertex: material, normal, position), positions and normals
// (2048 x 96 bits, three floats each) and materials (32 x 96 bits, an RGB
// triple of floats in [0,1], small enough to be registers). Each has one
// synchronous read port with one cycle of latency: the vertex fetch reads
// indices and positions, the fragment shader normals and materials.
// Writes come only from the UART: uart_rx delivers bytes, model_loader packs
// them into entries and chooses the target memory, and uart_tx echoes every
// byte back to the host. At power-up the index buffer holds stop words (an
// empty model) and the other memories zeros.
module model_memory
  import gfx_pkg::*;
#(
  parameter int unsigned INDEX_DEPTH    = 8196,
  parameter int unsigned POSITION_DEPTH = 2048,
  parameter int unsigned NORMAL_DEPTH   = 2048,
  parameter int unsigned MATERIAL_DEPTH = 32,
  parameter int unsigned CLKS_PER_BIT   = 868
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        uart_rx_in,
  output logic        uart_tx_out,
  input  logic [13:0] index_read_addr,
  output index_t      index,
  input  logic [10:0] position_read_addr,
  output fvec3_t      position,
  input  logic [10:0] normal_read_addr,
  output fvec3_t      normal,
  input  logic [4:0]  material_read_addr,
  output fvec3_t      material
);
  logic [35:0] index_mem    [INDEX_DEPTH];
  logic [95:0] position_mem [POSITION_DEPTH];
  logic [95:0] normal_mem   [NORMAL_DEPTH];
  logic [95:0] material_mem [MATERIAL_DEPTH];

  initial begin
    for (int i = 0; i < INDEX_DEPTH; i++)    index_mem[i]    = '1;
    for (int i = 0; i < POSITION_DEPTH; i++) position_mem[i] = '0;
    for (int i = 0; i < NORMAL_DEPTH; i++)   normal_mem[i]   = '0;
    for (int i = 0; i < MATERIAL_DEPTH; i++) material_mem[i] = '0;
  end

  logic       byte_valid;
  logic [7:0] rx_byte;
  logic       tx_busy;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rx(uart_rx_in), .valid(byte_valid), .data(rx_byte)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .start(byte_valid), .data(rx_byte), .busy(tx_busy), .tx(uart_tx_out)
  );

  logic        we;
  logic [1:0]  target;
  logic [13:0] waddr;
  logic [95:0] wdata;

  model_loader u_loader (
    .clk, .rst, .byte_valid, .byte_in(rx_byte),
    .we, .target, .addr(waddr), .wdata
  );

  always_ff @(posedge clk) begin
    if (we) begin
      case (target)
        2'd0: if (32'(waddr) < INDEX_DEPTH) index_mem[waddr] <= wdata[35:0];
        2'd1: if (32'(waddr) < POSITION_DEPTH) position_mem[waddr[10:0]] <= wdata;
        2'd2: if (32'(waddr) < NORMAL_DEPTH) normal_mem[waddr[10:0]] <= wdata;
        default: if (32'(waddr) < MATERIAL_DEPTH) material_mem[waddr[4:0]] <= wdata;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    index    <= index_t'(index_mem[index_read_addr]);
    position <= fvec3_t'(position_mem[position_read_addr]);
    normal   <= fvec3_t'(normal_mem[normal_read_addr]);
    material <= fvec3_t'(material_mem[material_read_addr]);
  end
endmodule
