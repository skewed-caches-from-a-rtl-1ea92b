// elbow_cache: top level of the 2-way skewed elbow data cache.
//
// Two logical way-banks (tag/state/data) and two timestamp arrays, one pair
// per bank, around the controller. With the defaults the cache holds 32 KB in
// 64-byte blocks, 256 per bank, indexed by XOR skewing functions and replaced
// by 5-bit CAT timestamps with elbow relocation (see elbow_ctrl).
//
// Interface: a valid/ready processor request port (one 64-bit word, byte
// strobes), a response pulse without back-pressure, and a next-level port
// with a fill request/response pair and a writeback request, each a
// valid/ready handshake carrying whole 64-byte blocks. events pulses one
// bit per cache event; cat_count is the allocation counter.
module elbow_cache #(
  parameter int unsigned WINDOW    = elbow_pkg::RELOC_WINDOW,
  parameter int unsigned MAX_RELOC = elbow_pkg::RELOC_MAX,
  parameter int unsigned MAX_DIST  = elbow_pkg::RELOC_MAX_DIST
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cpu_req_valid,
  output logic                  cpu_req_ready,
  input  elbow_pkg::cpu_req_t              cpu_req,
  output logic                  cpu_rsp_valid,
  output elbow_pkg::cpu_rsp_t              cpu_rsp,
  output logic                  l2_fill_req_valid,
  input  logic                  l2_fill_req_ready,
  output logic [elbow_pkg::ADDR_W-1:0]     l2_fill_addr,
  input  logic                  l2_fill_rsp_valid,
  input  logic [elbow_pkg::LINE_W-1:0]     l2_fill_data,
  output logic                  l2_wb_valid,
  input  logic                  l2_wb_ready,
  output logic [elbow_pkg::ADDR_W-1:0]     l2_wb_addr,
  output logic [elbow_pkg::LINE_W-1:0]     l2_wb_data,
  output elbow_pkg::cache_events_t         events,
  output logic [elbow_pkg::CAT_W-1:0]      cat_count
);
  // the index width is fixed by the page size through the skewing functions
  localparam int unsigned INDEX_W = elbow_pkg::INDEX_W;

  logic [1:0]                b_en, b_we, b_wvalid, b_wdirty, b_rvalid, b_rdirty;
  logic [1:0][INDEX_W-1:0]   b_idx;
  logic [1:0][elbow_pkg::TAG_W-1:0]     b_wtag, b_rtag;
  logic [1:0][elbow_pkg::LINE_W-1:0]    b_wdata, b_rdata;
  logic [1:0]                t_en, t_we;
  logic [1:0][INDEX_W-1:0]   t_idx;
  logic [1:0][elbow_pkg::TS_W-1:0]      t_wts, t_rts;

  elbow_ctrl #(
    .WINDOW(WINDOW), .MAX_RELOC(MAX_RELOC), .MAX_DIST(MAX_DIST)
  ) u_ctrl (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req, .cpu_rsp_valid, .cpu_rsp,
    .l2_fill_req_valid, .l2_fill_req_ready, .l2_fill_addr,
    .l2_fill_rsp_valid, .l2_fill_data,
    .l2_wb_valid, .l2_wb_ready, .l2_wb_addr, .l2_wb_data,
    .b_en, .b_we, .b_idx, .b_wvalid, .b_wdirty, .b_wtag, .b_wdata,
    .b_rvalid, .b_rdirty, .b_rtag, .b_rdata,
    .t_en, .t_we, .t_idx, .t_wts, .t_rts,
    .events, .cat_count
  );

  for (genvar b = 0; b < 2; b++) begin : g_bank
    way_bank #(.INDEX_W(INDEX_W)) u_bank (
      .clk, .rst_n,
      .en(b_en[b]), .we(b_we[b]), .idx(b_idx[b]),
      .wvalid(b_wvalid[b]), .wdirty(b_wdirty[b]), .wtag(b_wtag[b]), .wdata(b_wdata[b]),
      .rvalid(b_rvalid[b]), .rdirty(b_rdirty[b]), .rtag(b_rtag[b]), .rdata(b_rdata[b])
    );
    timestamp_array #(.INDEX_W(INDEX_W)) u_ts (
      .clk, .en(t_en[b]), .we(t_we[b]), .idx(t_idx[b]), .wts(t_wts[b]), .rts(t_rts[b])
    );
  end
endmodule
