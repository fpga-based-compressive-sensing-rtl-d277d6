// sensing_matrix_gen: builds the random BLK x BLK x NUM_FRAMES sensing matrix
// of the coded-exposure encoder and writes it, one byte per matrix row and
// frame, into the sensing-matrix BRAM.
//
// How it works (one element = one pixel position of the 8x8 tile):
//  * PICK  - the upper four bits of an 8-bit LFSR are the candidate index; an
//            index outside 1..13 is skipped (the LFSR steps once per PICK
//            cycle). start_index_map folds 1..4 to 1 and 10..13 to 10.
//  * SET   - a 2-bit counter adds 0..3 to the start frame on four consecutive
//            clocks; the 4:13 decoder sets one flip-flop per clock in the
//            bank of this element (even elements bank 0, odd elements bank 1).
//  * The clock after an element's last SET, its bank is pushed into the
//            8x13 register stack (ld) and cleared, while the next element is
//            already being built in the other bank (ping-pong).
//  * SHIFT - after the 8th element of a row is pushed, the stack shifts 13
//            times; each shift emits the row for one frame, written to
//            BRAM address 8*(f-1)+row (row 0 of frame 1 at 0, of frame 2 at 8...).
// After 8 rows all 104 bytes are written and done pulses for one clock.
//
// Interface: start (one-clock pulse, ignored while busy) begins a new matrix;
// the LFSR is not reseeded, so every start produces a different matrix.
// we/waddr/wdata drive the BRAM write port. wdata bit BLK-1 is column 0.
// Timing: each element takes 1 + (skipped indexes) + 4 clocks, each row adds
// 1 + 13 clocks; a matrix takes 8*(8*5+14) = 432 clocks plus one per skipped
// LFSR value.
// Follows the design: the LFSR, the index folding, counter + adder, decoder,
// ping-pong set/reset banks, mux, register stack and BRAM layout. This
// implementation's own choices: the LFSR polynomial and seed, stepping the
// LFSR only when an index is consumed, and the state machine sequencing.
module sensing_matrix_gen
#(
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES,
  parameter int unsigned BUMP       = cs_pkg::BUMP,
  parameter int unsigned BLK        = cs_pkg::BLK,
  parameter int unsigned LOW_START  = cs_pkg::LOW_START,
  parameter logic [7:0]  SEED       = 8'hA5,
  localparam int unsigned IW        = $clog2(NUM_FRAMES + 1),
  localparam int unsigned AW        = $clog2(NUM_FRAMES * BLK),
  localparam int unsigned BW        = $clog2(BLK)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           we,
  output logic [AW-1:0]  waddr,
  output logic [BLK-1:0] wdata
);
  typedef enum logic [2:0] {S_IDLE, S_PICK, S_SET, S_LDLAST, S_SHIFT} state_t;
  state_t state;

  logic [7:0]            lfsr_q;     // bits 3:0 only feed the shift chain
  logic                  idx_valid;
  logic [IW-1:0]         idx_start;
  logic [IW-1:0]         start_r;
  logic [BW-1:0]         row, col;
  logic [IW-1:0]         fcnt;       // frame being shifted out, 0-based
  logic                  pend, pend_bank, k_last;
  logic [IW-1:0]         frame_index;
  logic [NUM_FRAMES-1:0] set_vec, bank_q;

  cs_lfsr #(.WIDTH(8), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en(state == S_PICK), .state(lfsr_q)
  );

  start_index_map #(.NUM_FRAMES(NUM_FRAMES), .BUMP(BUMP), .LOW_START(LOW_START)) u_map (
    .index(lfsr_q[7 -: IW]), .valid(idx_valid), .start_frame(idx_start)
  );

  bump_counter #(.NUM_FRAMES(NUM_FRAMES), .BUMP(BUMP)) u_cnt (
    .clk, .rst_n, .clr(state == S_PICK), .en(state == S_SET),
    .start_frame(start_r), .frame_index, .last(k_last)
  );

  frame_decoder #(.NUM_FRAMES(NUM_FRAMES)) u_dec (
    .frame_index, .en(state == S_SET), .onehot(set_vec)
  );

  exposure_banks #(.NUM_FRAMES(NUM_FRAMES)) u_banks (
    .clk, .rst_n, .set_vec, .set_bank(col[0]),
    .clr0(pend && !pend_bank), .clr1(pend && pend_bank),
    .sel(pend_bank), .q_sel(bank_q)
  );

  register_stack #(.NUM_FRAMES(NUM_FRAMES), .BLK(BLK)) u_stack (
    .clk, .ld(pend), .shift(state == S_SHIFT), .din(bank_q), .dout(wdata)
  );

  assign busy  = (state != S_IDLE);
  assign we    = (state == S_SHIFT);
  assign waddr = AW'(fcnt * BLK + row);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      pend      <= 1'b0;
      pend_bank <= 1'b0;
      row       <= '0;
      col       <= '0;
      fcnt      <= '0;
      start_r   <= '0;
    end else begin
      done <= 1'b0;
      pend <= 1'b0;             // a pending push lasts exactly one clock
      unique case (state)
        S_IDLE: if (start) begin
          row   <= '0;
          col   <= '0;
          state <= S_PICK;
        end
        S_PICK: if (idx_valid) begin
          start_r <= idx_start;
          state   <= S_SET;
        end
        S_SET: begin
          if (k_last) begin
            pend      <= 1'b1;
            pend_bank <= col[0];
            if (col == BW'(BLK - 1)) state <= S_LDLAST;
            else begin
              col   <= col + 1'b1;
              state <= S_PICK;
            end
          end
        end
        S_LDLAST: begin
          fcnt  <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          fcnt <= fcnt + 1'b1;
          if (fcnt == IW'(NUM_FRAMES - 1)) begin
            col <= '0;
            if (row == BW'(BLK - 1)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              row   <= row + 1'b1;
              state <= S_PICK;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A stack push never targets the bank that is being set in the same clock.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (pend && state == S_SET) |-> (pend_bank != col[0]));
endmodule
