// l2_model: behavioural model of the next cache level for testbenches.
//
// Backing store of 64-byte blocks in an associative array; a block never
// written holds init_word() of each of its word addresses. A fill request
// is accepted when ready is high and answered with one rsp_valid pulse
// LATENCY cycles later. Writebacks are stored when accepted. With STALL_PCT
// above zero, ready is randomly withheld to exercise the handshakes.
module l2_model #(
  parameter int unsigned LATENCY   = 4,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic         clk,
  input  logic         fill_req_valid,
  output logic         fill_req_ready,
  input  logic [31:0]  fill_addr,
  output logic         fill_rsp_valid,
  output logic [511:0] fill_data,
  input  logic         wb_valid,
  output logic         wb_ready,
  input  logic [31:0]  wb_addr,
  input  logic [511:0] wb_data
);
  logic [511:0] mem [logic [31:0]];
  bit           pend = 0;
  int unsigned  cnt = 0;
  logic [31:0]  addr_q;
  bit           stall = 0;
  bit           stall_en = (STALL_PCT != 0);
  int unsigned  fills = 0, wbs = 0, stalled = 0;

  function automatic logic [63:0] init_word(input logic [31:0] word_addr);
    return {word_addr ^ 32'h5A5A_1234, ~word_addr * 32'd2654435761};
  endfunction

  function automatic logic [511:0] read_line(input logic [31:0] a);
    logic [511:0] l;
    if (mem.exists(a)) return mem[a];
    for (int w = 0; w < 8; w++) l[w*64 +: 64] = init_word((a >> 3) + 32'(w));
    return l;
  endfunction

  initial begin
    fill_rsp_valid = 0;
    fill_data      = '0;
  end

  assign fill_req_ready = !pend && !fill_rsp_valid && !stall;
  assign wb_ready       = !stall;

  always @(posedge clk) begin
    if (fill_req_valid && !fill_req_ready) stalled++;
    fill_rsp_valid <= 0;
    if (wb_valid && wb_ready) begin
      mem[wb_addr] = wb_data;
      wbs++;
    end
    if (fill_req_valid && fill_req_ready) begin
      fills++;
      addr_q <= fill_addr;
      if (LATENCY <= 1) begin
        fill_rsp_valid <= 1;
        fill_data      <= read_line(fill_addr);
      end else begin
        pend <= 1;
        cnt  <= LATENCY - 1;
      end
    end else if (pend) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin
        pend           <= 0;
        fill_rsp_valid <= 1;
        fill_data      <= read_line(addr_q);
      end
    end
    stall <= stall_en && (($urandom % 100) < STALL_PCT);
  end
endmodule
