// vertex_mem_model: behavioural model (not synthesizable design) of the
// external memory that holds the vertex tables of the perfect hash function.
// The real part is an RLDRAM2 device at 533 MHz doing one read per memory
// cycle; seen from the 266 MHz packet clock that is two reads per packet
// cycle, which is what this model offers: two read ports, both answered
// MEM_LAT packet cycles after rd_en, with rd_valid. Testbenches load the
// contents by writing the `mem` array directly; it starts at all zeros.
module vertex_mem_model
  import mspcca_pkg::*;
#(
  parameter int unsigned MEM_LAT = 4
) (
  input  logic                 clk,
  input  logic                 rd_en,
  input  logic [VT_ADDR_W-1:0] addr_a,
  input  logic [VT_ADDR_W-1:0] addr_b,
  output logic                 rd_valid,
  output logic [VT_DATA_W-1:0] data_a,
  output logic [VT_DATA_W-1:0] data_b
);

  logic [VT_DATA_W-1:0] mem [2**VT_ADDR_W];

  typedef struct packed {
    logic                 v;
    logic [VT_DATA_W-1:0] a;
    logic [VT_DATA_W-1:0] b;
  } resp_t;

  resp_t pipe [MEM_LAT];

  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (pipe[i]) pipe[i] = '0;
  end

  always @(posedge clk) begin
    pipe[0] <= '{v: rd_en, a: mem[addr_a], b: mem[addr_b]};
    for (int i = 1; i < MEM_LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign rd_valid = pipe[MEM_LAT-1].v;
  assign data_a   = pipe[MEM_LAT-1].a;
  assign data_b   = pipe[MEM_LAT-1].b;

endmodule
