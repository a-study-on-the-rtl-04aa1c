// ctrl_gen: control signal generator of the 2D DCT/IDCT.
//
// Two sequencers run side by side, one per 1D unit, joined by two "full"
// flags, one per transposition-memory bank.
//
// Row sequencer (row start): GO is accepted when the bank it will fill is
// empty; the mode (dct_idct) is latched for the block. For each row r it
// reads the eight samples r*8+c over bus 1 into the row unit's input
// register, then starts the row unit as soon as the unit is ready. Loading
// row r+1 overlaps the computation of row r. Each result word k of row r is
// written to the transposition memory at {k, r}. The number of finished
// rows is shown on stat_bus; when it reaches 8 (6'b001000) the bank is
// marked full, which is the column start for the other unit.
//
// Column sequencer (column start): when the next bank is full it reads
// column k ({k, 0..7}) into the column unit's input register and starts the
// column unit, for k = 0..7, again overlapping the load of column k+1 with
// the computation of column k. Result word j of column k goes out on bus 2
// at address j*8+k. After the last word the bank is freed and done pulses.
//
// The split into row start and column start, the row count 001000 that
// starts the column pass and the GO, DONE, bus and status signals follow
// the published controller; the ping-pong banks, the handshakes and the
// address orders are this design's.
// Timing: bus 1 and the transposition memory return read data one cycle
// after the address. bus 2 writes happen in the cycle the column unit
// presents its result; done is high in the cycle of the last write.
module ctrl_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  logic       dct_idct,
  output logic       go_ready,
  // bus 1 (block input)
  output logic [5:0] addr_bus1,
  output logic       bus1_en,
  output logic       bus1_rd,
  // row unit and its input register
  output logic       reg1_we,
  output logic [2:0] reg1_waddr,
  output logic       dpu1_start,
  output logic       dpu1_dct,
  input  logic       dpu1_ready,
  input  logic       dpu1_valid,
  input  logic [2:0] dpu1_idx,
  input  logic       dpu1_last,
  // transposition memory
  output logic       tm_we,
  output logic       tm_wbank,
  output logic [5:0] tm_waddr,
  output logic       tm_re,
  output logic       tm_rbank,
  output logic [5:0] tm_raddr,
  // column unit and its input register
  output logic       reg2_we,
  output logic [2:0] reg2_waddr,
  output logic       dpu2_start,
  output logic       dpu2_dct,
  input  logic       dpu2_ready,
  input  logic       dpu2_valid,
  input  logic [2:0] dpu2_idx,
  input  logic       dpu2_last,
  // bus 2 (block output) and status
  output logic [5:0] addr_bus2,
  output logic       bus2_en,
  output logic       bus2_wr,
  output logic       done,
  output logic [5:0] stat_bus
);
  typedef enum logic [1:0] {P_IDLE, P_LOAD, P_WAIT, P_FLUSH} phase_t;

  // ---------------------------------------------------------------- banks
  logic [1:0] full;
  logic [1:0] bank_dct;
  logic       wb, rb;                 // bank being filled / drained

  // --------------------------------------------------------- row sequencer
  phase_t     rph;
  logic [2:0] rrow, rcol;             // row being loaded, next word
  logic [2:0] dpu1_row;               // row the row unit works on
  logic       ld1_v;                  // bus-1 read data arrives this cycle
  logic [2:0] ld1_idx;
  logic       mode1;
  logic [3:0] rows_done;
  logic       row_block_end;

  assign go_ready   = (rph == P_IDLE) && !full[wb];
  assign bus1_rd    = (rph == P_LOAD);
  assign bus1_en    = (rph != P_IDLE);
  assign addr_bus1  = {rrow, rcol};
  assign reg1_we    = ld1_v;
  assign reg1_waddr = ld1_idx;
  assign dpu1_start = (rph == P_WAIT) && !ld1_v && dpu1_ready;
  assign dpu1_dct   = mode1;
  assign tm_we      = dpu1_valid;
  assign tm_wbank   = wb;
  assign tm_waddr   = {dpu1_idx, dpu1_row};
  assign stat_bus   = {2'b00, rows_done};
  assign row_block_end = (rph == P_FLUSH) && dpu1_valid && dpu1_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rph       <= P_IDLE;
      rrow      <= '0;
      rcol      <= '0;
      dpu1_row  <= '0;
      ld1_v     <= 1'b0;
      ld1_idx   <= '0;
      mode1     <= 1'b1;
      rows_done <= '0;
      wb        <= 1'b0;
    end else begin
      ld1_v   <= bus1_rd;
      ld1_idx <= rcol;
      if (dpu1_valid && dpu1_last) rows_done <= rows_done + 4'd1;
      unique case (rph)
        P_IDLE: if (go && !full[wb]) begin
          mode1     <= dct_idct;
          rrow      <= '0;
          rcol      <= '0;
          rows_done <= '0;
          rph       <= P_LOAD;
        end
        P_LOAD: begin
          rcol <= rcol + 3'd1;
          if (rcol == 3'd7) rph <= P_WAIT;
        end
        P_WAIT: if (dpu1_start) begin
          dpu1_row <= rrow;
          if (rrow == 3'd7) rph <= P_FLUSH;
          else begin
            rrow <= rrow + 3'd1;
            rph  <= P_LOAD;
          end
        end
        P_FLUSH: if (row_block_end) begin
          wb  <= ~wb;
          rph <= P_IDLE;
        end
        default: rph <= P_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ column sequencer
  phase_t     cph;
  logic [2:0] ccol, crow;             // column being loaded, next word
  logic [2:0] dpu2_col;
  logic       ld2_v;
  logic [2:0] ld2_idx;
  logic       mode2;
  logic       col_block_end;

  assign tm_re      = (cph == P_LOAD);
  assign tm_rbank   = rb;
  assign tm_raddr   = {ccol, crow};
  assign reg2_we    = ld2_v;
  assign reg2_waddr = ld2_idx;
  assign dpu2_start = (cph == P_WAIT) && !ld2_v && dpu2_ready;
  assign dpu2_dct   = mode2;
  assign bus2_wr    = dpu2_valid;
  assign bus2_en    = (cph != P_IDLE);
  assign addr_bus2  = {dpu2_idx, dpu2_col};
  assign col_block_end = (cph == P_FLUSH) && dpu2_valid && dpu2_last;
  assign done       = col_block_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cph      <= P_IDLE;
      ccol     <= '0;
      crow     <= '0;
      dpu2_col <= '0;
      ld2_v    <= 1'b0;
      ld2_idx  <= '0;
      mode2    <= 1'b1;
      rb       <= 1'b0;
    end else begin
      ld2_v   <= tm_re;
      ld2_idx <= crow;
      unique case (cph)
        P_IDLE: if (full[rb]) begin
          mode2 <= bank_dct[rb];
          ccol  <= '0;
          crow  <= '0;
          cph   <= P_LOAD;
        end
        P_LOAD: begin
          crow <= crow + 3'd1;
          if (crow == 3'd7) cph <= P_WAIT;
        end
        P_WAIT: if (dpu2_start) begin
          dpu2_col <= ccol;
          if (ccol == 3'd7) cph <= P_FLUSH;
          else begin
            ccol <= ccol + 3'd1;
            cph  <= P_LOAD;
          end
        end
        P_FLUSH: if (col_block_end) begin
          rb  <= ~rb;
          cph <= P_IDLE;
        end
        default: cph <= P_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ bank flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      bank_dct <= '1;
    end else begin
      if (row_block_end) begin
        full[wb]     <= 1'b1;
        bank_dct[wb] <= mode1;
      end
      if (col_block_end) full[rb] <= 1'b0;
    end
  end

  // A bank is never filled while still full, nor drained while empty.
  a_fill_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                 (rph == P_LOAD && rrow == 3'd0 && rcol == 3'd0) |-> !full[wb]);
  a_drain_full: assert property (@(posedge clk) disable iff (!rst_n)
                                 (cph != P_IDLE) |-> full[rb]);
endmodule
