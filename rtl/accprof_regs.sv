// accprof_regs: AXI4-Lite slave of the profiling IP (64-bit data).
//
// This is the memory-mapped window the instrumented application writes to
// and the host reads the finished call graph from. Byte address map:
//   0x00        cycles count                         (read/write)
//   0x08..0x30  event counts 1..6                    (read/write)
//   0x38        metadata: event IDs, function ID     (read/write; a write
//               starts the controller)
//   0x40        status                               (read only)
//   RAM_BASE..  call-graph RAM, chunk n word w at RAM_BASE + 64*n + 8*w
//               (read only); RAM_BASE = 2**(ADDR_W-1)
// Status word: [15:0] chunks used, [31:16] stack depth, [32] stack
// underflow, [33] stack overflow, [34] RAM full, [63] busy.
//
// The eight 64-bit registers (seven counts, one metadata word) and the
// metadata word triggering the prologue/epilogue are the document's; the
// status word, the RAM read window and all offsets are this design's. Byte
// strobes are honoured. Writes to read-only locations are answered SLVERR.
//
// Timing: a write is taken when address and data are both valid, no write
// response is pending and the controller is idle; so a software store that
// follows an epilogue stalls on the bus for up to eight cycles until the
// counts are stored. A metadata write raises 'start' in the next cycle,
// when the registers already hold the full record. Reads answer one cycle
// after the address is taken.
module accprof_regs
  import accprof_pkg::*;
#(
  parameter int unsigned ADDR_W  = 18,  // 128 KiB RAM window + registers
  parameter int unsigned RAM_AW  = 14,  // RAM word address width
  parameter int unsigned USED_W  = 12,
  parameter int unsigned SPTR_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  word_t             s_wdata,
  input  logic [7:0]        s_wstrb,
  output logic              s_bvalid,
  input  logic              s_bready,
  output logic [1:0]        s_bresp,
  input  logic              s_arvalid,
  output logic              s_arready,
  input  logic [ADDR_W-1:0] s_araddr,
  output logic              s_rvalid,
  input  logic              s_rready,
  output word_t             s_rdata,
  output logic [1:0]        s_rresp,
  // controller
  output logic              start,
  output record_t           rec,
  input  logic              ctrl_busy,
  input  logic [USED_W-1:0] used,
  input  logic [SPTR_W-1:0] stk_depth,
  input  err_t              err,
  // call-graph RAM read port
  output logic              ram_re,
  output logic [RAM_AW-1:0] ram_raddr,
  input  word_t             ram_rdata
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  word_t regs [NUM_REGS];
  word_t status;
  word_t rreg_q;
  logic  rsel_ram_q;
  logic  wr_go, rd_go;
  logic  aw_ram, ar_ram;
  logic [3:0] aw_word, ar_word;

  assign status = {ctrl_busy, 28'd0, err, 16'(stk_depth), 16'(used)};

  assign aw_ram  = s_awaddr[ADDR_W-1];
  assign ar_ram  = s_araddr[ADDR_W-1];
  assign aw_word = s_awaddr[6:3];
  assign ar_word = s_araddr[6:3];

  // Write channel: address and data taken together.
  assign wr_go     = s_awvalid && s_wvalid && !s_bvalid && !start && !ctrl_busy;
  assign s_awready = wr_go;
  assign s_wready  = wr_go;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0;
      s_bresp  <= RESP_OKAY;
      start    <= 1'b0;
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else begin
      start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        if (!aw_ram && s_awaddr[ADDR_W-2:7] == '0 && aw_word < 4'(NUM_REGS)) begin
          s_bresp <= RESP_OKAY;
          for (int b = 0; b < 8; b++)
            if (s_wstrb[b]) regs[aw_word[2:0]][8*b +: 8] <= s_wdata[8*b +: 8];
          if (aw_word == 4'(REG_META)) start <= 1'b1;
        end else begin
          s_bresp <= RESP_SLVERR;
        end
      end
    end
  end

  always_comb begin
    rec.meta = meta_t'(regs[REG_META]);
    for (int i = 0; i < NUM_COUNTS; i++) rec.counts[i] = regs[REG_CYCLES + i];
  end

  // Read channel: one read in flight.
  assign rd_go     = s_arvalid && !s_rvalid;
  assign s_arready = rd_go;
  assign ram_re    = rd_go && ar_ram;
  assign ram_raddr = s_araddr[RAM_AW+2:3];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_rvalid   <= 1'b0;
      s_rresp    <= RESP_OKAY;
      rsel_ram_q <= 1'b0;
      rreg_q     <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_go) begin
        s_rvalid   <= 1'b1;
        rsel_ram_q <= ar_ram;
        s_rresp    <= RESP_OKAY;
        if (ar_ram) begin
          rreg_q <= '0;
        end else if (s_araddr[ADDR_W-2:7] != '0 || ar_word > 4'(REG_STATUS)) begin
          rreg_q  <= '0;
          s_rresp <= RESP_SLVERR;
        end else if (ar_word == 4'(REG_STATUS)) begin
          rreg_q <= status;
        end else begin
          rreg_q <= regs[ar_word[2:0]];
        end
      end
    end
  end

  assign s_rdata = rsel_ram_q ? ram_rdata : rreg_q;

  // AXI rule: a valid stays high, with stable payload, until it is taken.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_awvalid && !s_awready |=> s_awvalid && $stable(s_awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_wvalid && !s_wready |=> s_wvalid && $stable(s_wdata));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_arvalid && !s_arready |=> s_arvalid && $stable(s_araddr));
  a_b_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid && $stable(s_bresp));
  a_r_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
