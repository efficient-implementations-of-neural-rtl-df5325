// ext_mem_model: behavioural model of the off-chip memory the accelerator
// reads its configuration and inputs from and writes its results to.
// Read port: a request is granted in a cycle with probability
// GNT_PCT percent; granted reads return in order, LAT cycles later, with
// rvalid. Write port: granted likewise, the word is stored at the grant.
// Testbenches fill and inspect mem directly by hierarchical reference.
module ext_mem_model #(
  parameter int AW      = 16,
  parameter int DW      = 32,
  parameter int LAT     = 3,
  parameter int GNT_PCT = 70
) (
  input  logic          clk,
  input  logic          rd_req,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_gnt,
  output logic          rd_rvalid,
  output logic [DW-1:0] rd_rdata,
  input  logic          wr_req,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  output logic          wr_gnt
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] pipe_d [LAT];
  logic          pipe_v [LAT];
  int            rd_grants = 0, rd_waits = 0, wr_grants = 0, wr_waits = 0;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 0; pipe_d[i] = '0; end
    rd_gnt = 0; wr_gnt = 0;
  end

  // grant decisions change on the falling edge so the DUT sees stable values
  always @(negedge clk) begin
    rd_gnt <= rd_req && ($urandom_range(0, 99) < GNT_PCT);
    wr_gnt <= wr_req && ($urandom_range(0, 99) < GNT_PCT);
  end

  assign rd_rvalid = pipe_v[LAT-1];
  assign rd_rdata  = pipe_d[LAT-1];

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= rd_req && rd_gnt;
    pipe_d[0] <= mem[rd_addr];
    if (rd_req && rd_gnt) rd_grants++;
    if (rd_req && !rd_gnt) rd_waits++;
    if (wr_req && wr_gnt) begin
      mem[wr_addr] <= wr_data;
      wr_grants++;
    end
    if (wr_req && !wr_gnt) wr_waits++;
  end
endmodule
