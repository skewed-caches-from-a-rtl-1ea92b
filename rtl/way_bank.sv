// way_bank: one logical way-bank of the skewed cache.
//
// Holds, for 2^INDEX_W lines, a tag and a data block in single-port arrays
// plus valid and dirty bits in flip-flops (so that reset empties the bank).
// Each bank has its own address decoder, i.e. its own index port, so both
// banks are read in the same cycle at different, independently skewed
// indices. Physically the two banks are meant to be bit-line interleaved in
// one array; logically they are separate and modelled as two instances.
//
// Interface: en with we=0 reads line idx, and rmeta/rdata hold it from the
// next cycle on (synchronous read). en with we=1 writes wmeta/wdata to idx
// (whole line). One access per cycle.
module way_bank #(
  parameter int unsigned INDEX_W = elbow_pkg::INDEX_W,
  parameter int unsigned TAG_W   = elbow_pkg::TAG_W,
  parameter int unsigned LINE_W  = elbow_pkg::LINE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               we,
  input  logic [INDEX_W-1:0] idx,
  input  logic               wvalid,
  input  logic               wdirty,
  input  logic [TAG_W-1:0]   wtag,
  input  logic [LINE_W-1:0]  wdata,
  output logic               rvalid,
  output logic               rdirty,
  output logic [TAG_W-1:0]   rtag,
  output logic [LINE_W-1:0]  rdata
);
  localparam int unsigned LINES = 1 << INDEX_W;

  logic [TAG_W-1:0]  tag_mem  [LINES];
  logic [LINE_W-1:0] data_mem [LINES];
  logic [LINES-1:0]  valid_q, dirty_q;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        tag_mem[idx]  <= wtag;
        data_mem[idx] <= wdata;
      end else begin
        rtag  <= tag_mem[idx];
        rdata <= data_mem[idx];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      dirty_q <= '0;
      rvalid  <= 1'b0;
      rdirty  <= 1'b0;
    end else if (en) begin
      if (we) begin
        valid_q[idx] <= wvalid;
        dirty_q[idx] <= wdirty;
      end else begin
        rvalid <= valid_q[idx];
        rdirty <= dirty_q[idx];
      end
    end
  end
endmodule
