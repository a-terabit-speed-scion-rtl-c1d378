// lookup_table: exact-match table written by the control plane, read by the data plane.
//
// Used for the two tables of the router: interface ID -> port (filled in from what path
// exploration learns about which neighbour AS sits behind which port) and, for packets
// addressed to this AS, destination host -> port. The table is direct-mapped: the low
// IDX_W bits of the key select an entry, which stores the full key as a tag, the result
// and a valid bit; a read hits when the entry is valid and its tag equals the key.
// NRD read ports read the same contents, the way a match/action pipeline holds one
// copy of a table per stage that reads it. What the tables hold comes from the source
// design; the direct-mapped organisation and the sizes are this design's own.
//
// Timing: reads are combinational; a write (wr_en, key, data, wr_set = 1 to insert,
// 0 to delete) takes effect at the next clock edge. Reset empties the table.
module lookup_table #(
  parameter int unsigned KEY_W  = 16,
  parameter int unsigned IDX_W  = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned NRD    = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic              wr_set,
  input  logic [KEY_W-1:0]  wr_key,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [KEY_W-1:0]  rd_key  [NRD],
  output logic              rd_hit  [NRD],
  output logic [DATA_W-1:0] rd_data [NRD]
);

  localparam int unsigned DEPTH = 1 << IDX_W;

  logic [DEPTH-1:0]  valid_q;
  logic [KEY_W-1:0]  tag_mem  [DEPTH];
  logic [DATA_W-1:0] data_mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[wr_key[IDX_W-1:0]] <= wr_set;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_mem[wr_key[IDX_W-1:0]]  <= wr_key;
      data_mem[wr_key[IDX_W-1:0]] <= wr_data;
    end
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    logic [IDX_W-1:0] idx;
    assign idx        = rd_key[r][IDX_W-1:0];
    assign rd_hit[r]  = valid_q[idx] && (tag_mem[idx] == rd_key[r]);
    assign rd_data[r] = data_mem[idx];
  end

endmodule
