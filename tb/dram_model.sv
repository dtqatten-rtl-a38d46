// dram_model: behavioural model of the off-chip DRAM read port (not
// synthesizable). A byte array of SIZE bytes; a read request for a
// word-aligned byte address is accepted when `req_ready` is high and answered
// LAT cycles later with the DRAM_W-bit little-endian word at that address,
// in request order. `req_ready` drops on a pseudo-random one cycle in four
// when STALLS is set, to exercise back-pressure. Testbenches fill `mem`
// directly.
module dram_model #(
  parameter int unsigned SIZE   = 65536,
  parameter int unsigned DRAM_W = 64,
  parameter int unsigned LAT    = 3,
  parameter bit          STALLS = 1'b1
) (
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [31:0]       req_addr,
  output logic              resp_valid,
  output logic [DRAM_W-1:0] resp_data
);
  logic [7:0] mem [SIZE];
  logic              pv [LAT];
  logic [DRAM_W-1:0] pd [LAT];
  logic [7:0]        lfsr = 8'h5a;
  int unsigned       reads = 0;

  initial for (int i = 0; i < LAT; i++) begin pv[i] = 1'b0; pd[i] = '0; end

  assign req_ready  = STALLS ? (lfsr[1:0] != 2'b00) : 1'b1;
  assign resp_valid = pv[LAT-1];
  assign resp_data  = pd[LAT-1];

  always @(posedge clk) begin
    logic [DRAM_W-1:0] w;
    lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
    for (int i = LAT - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    w = '0;
    for (int b = 0; b < DRAM_W / 8; b++)
      w[b*8 +: 8] = (req_addr + b < SIZE) ? mem[req_addr + b] : 8'd0;
    pv[0] <= req_valid && req_ready;
    pd[0] <= w;
    if (req_valid && req_ready) reads++;
  end
endmodule
