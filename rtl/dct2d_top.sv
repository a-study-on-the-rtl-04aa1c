// dct2d_top: 8x8 two-dimensional DCT/IDCT by row-column decomposition with
// distributed arithmetic (no multipliers).
//
// A block of 64 16-bit words is read over bus 1 row by row. The first 1D
// unit transforms each row; its results are written transposed into the
// transposition memory. When all eight rows are in, the second 1D unit
// transforms the eight columns and writes the 2D result over bus 2. The
// control signal generator sequences both passes; because the memory has
// two banks, the first unit already works on block n+1 while the second
// finishes block n. The result of column k, frequency j, is written at
// address j*8+k, so the output block is row-major with the vertical
// frequency as the row.
// Interface: go starts a block when go_ready is 1; dct_idct (1 = DCT,
// 0 = IDCT) is taken with go. Bus 1: addr_bus1 with bus1_rd, data_bus1
// valid one cycle later; bus1_en is high while a block is being read.
// Bus 2: addr_bus2 and data_bus2 with bus2_wr; bus2_en is high while a
// block is being written. done pulses with the last write of a block;
// stat_bus counts the rows finished by the first unit in its block.
// reset is active high (asynchronous).
// Timing: about 280 cycles from go to the first bus-2 write of a block and
// about 280 cycles per block when blocks follow each other.
// The two 1D units, the transposition memory, the control generator and
// the bus and status names follow the published block diagrams; widths and
// handshakes not given there are this design's.
module dct2d_top (
  input  logic                          clk,
  input  logic                          reset,
  input  logic                          go,
  input  logic                          dct_idct,
  output logic                          go_ready,
  output logic [5:0]                    addr_bus1,
  output logic                          bus1_en,
  output logic                          bus1_rd,
  input  logic signed [dct_pkg::DW-1:0] data_bus1,
  output logic [5:0]                    addr_bus2,
  output logic                          bus2_en,
  output logic                          bus2_wr,
  output logic signed [dct_pkg::DW-1:0] data_bus2,
  output logic                          done,
  output logic [5:0]                    stat_bus
);
  import dct_pkg::DW;

  logic rst_n;
  assign rst_n = ~reset;

  logic              reg1_we, reg2_we;
  logic [2:0]        reg1_waddr, reg2_waddr;
  logic signed [DW-1:0] row_in [8];
  logic signed [DW-1:0] col_in [8];
  logic              dpu1_start, dpu1_dct, dpu1_ready, dpu1_valid, dpu1_last;
  logic              dpu2_start, dpu2_dct, dpu2_ready, dpu2_valid, dpu2_last;
  logic [2:0]        dpu1_idx, dpu2_idx;
  logic signed [DW-1:0] dpu1_data, tm_rdata;
  logic              tm_we, tm_wbank, tm_re, tm_rbank;
  logic [5:0]        tm_waddr, tm_raddr;

  ctrl_gen u_ctrl (
    .clk, .rst_n, .go, .dct_idct, .go_ready,
    .addr_bus1, .bus1_en, .bus1_rd,
    .reg1_we, .reg1_waddr, .dpu1_start, .dpu1_dct, .dpu1_ready,
    .dpu1_valid, .dpu1_idx, .dpu1_last,
    .tm_we, .tm_wbank, .tm_waddr, .tm_re, .tm_rbank, .tm_raddr,
    .reg2_we, .reg2_waddr, .dpu2_start, .dpu2_dct, .dpu2_ready,
    .dpu2_valid, .dpu2_idx, .dpu2_last,
    .addr_bus2, .bus2_en, .bus2_wr, .done, .stat_bus);

  in_reg8 #(.DW(DW)) u_reg1 (.clk, .rst_n, .we(reg1_we), .waddr(reg1_waddr),
                             .wdata(data_bus1), .q(row_in));

  dpu_1d u_dpu1 (.clk, .rst_n, .start(dpu1_start), .dct(dpu1_dct), .x(row_in),
                 .ready(dpu1_ready), .out_valid(dpu1_valid), .out_idx(dpu1_idx),
                 .out_last(dpu1_last), .out_data(dpu1_data));

  tmem #(.DW(DW), .DEPTH(64)) u_tmem (
    .clk, .we(tm_we), .wbank(tm_wbank), .waddr(tm_waddr), .wdata(dpu1_data),
    .re(tm_re), .rbank(tm_rbank), .raddr(tm_raddr), .rdata(tm_rdata));

  in_reg8 #(.DW(DW)) u_reg2 (.clk, .rst_n, .we(reg2_we), .waddr(reg2_waddr),
                             .wdata(tm_rdata), .q(col_in));

  dpu_1d u_dpu2 (.clk, .rst_n, .start(dpu2_start), .dct(dpu2_dct), .x(col_in),
                 .ready(dpu2_ready), .out_valid(dpu2_valid), .out_idx(dpu2_idx),
                 .out_last(dpu2_last), .out_data(data_bus2));
endmodule
