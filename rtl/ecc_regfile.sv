// ecc_regfile: main memory of an ECC processor. DEPTH words of W bits hold the
// base point, the curve constant, the projective coordinates after the ladder
// loop and the temporaries of the coordinate conversion. Two asynchronous read
// ports and one synchronous write port (write at the rising clock edge when we
// is high), the shape of FPGA distributed RAM. No reset: every word is written
// before it is read. Size and port count are this design's choice.
module ecc_regfile #(
  parameter int unsigned W     = 163,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  rda,
  input  logic [AW-1:0] rb,
  output logic [W-1:0]  rdb
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rda = mem[ra];
  assign rdb = mem[rb];
endmodule
