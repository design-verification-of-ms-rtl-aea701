// operand_register: WIDTH-bit input register (Register A / Register B).
//
// Captures its data input on every rising clock edge; the ALU datapath reads
// the held value. Active-low asynchronous reset clears it to zero. The document
// shows the two operand registers feeding the ALU but gives no load control or
// reset, so the load-every-cycle behaviour and the reset are this design's own.
// Latency: d appears on q one clock edge later.
module operand_register #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
