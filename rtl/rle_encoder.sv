// Zig-zag scan and run-length coding of one quantised 8x8 block, producing
// the symbols that are then Huffman coded.
//
// On start the 64 coefficients (row-major) are captured. The first symbol
// is the DC term, coded as the difference from the previous block's DC
// value: symbol = its magnitude size, plus the raw magnitude bits. The 63
// AC terms are then visited in zig-zag order, one per clock. Zeros are
// counted; a non-zero value v after r zeros gives the symbol (r << 4) |
// size(v) with the raw bits of v; a run of 16 or more zeros before a
// non-zero value first emits 0xF0 (16 zeros) for every 16. When only zeros
// remain, the symbol 0x00 (end of block) is emitted, unless the last AC
// term is non-zero. Examples: the block of the worked example gives
// 05 04 13 24 04 F0 F0 D1 00.
//
// Output handshake: sym_valid with sym, size, bits and is_dc is held until
// sym_ready; a symbol moves on a clock where both are high. done pulses
// after the last symbol. new_image resets the DC predictor to 0.
// The coefficients must fit in 12 bits (signed), as in baseline JPEG.
// What the document gives: zig-zag order, the run/size symbol with raw
// bits, the 16-zero symbol, end of block, DC differences and the magnitude
// table. The one-coefficient-per-clock schedule and handshake are this
// design's own.
module rle_encoder
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        new_image,
  input  logic        start,
  input  coef_t       coef [64],
  output logic        busy,
  output logic        done,
  output logic        sym_valid,
  input  logic        sym_ready,
  output logic [7:0]  sym,
  output logic [3:0]  size,
  output logic [10:0] bits,
  output logic        is_dc
);

  typedef enum logic [1:0] {R_IDLE, R_DC, R_AC, R_EOB} rstate_t;
  rstate_t state;

  coef_t        zz [64];        // captured block, in zig-zag order
  coef_t        pred;
  logic [5:0]   n;              // zig-zag position
  logic [5:0]   run;
  logic [5:0]   last_nz;        // last non-zero AC position, 0 if none

  logic signed [11:0] mval;
  logic [3:0]         msize;
  logic [10:0]        mbits;
  coef_t              dc_diff;
  logic               cur_zero;

  magnitude_enc u_mag (.v(mval), .size(msize), .bits(mbits));

  always_comb begin
    dc_diff  = zz[0] - pred;
    cur_zero = zz[n] == '0;
    mval     = (state == R_DC) ? 12'(dc_diff) : 12'(zz[n]);
    last_nz  = '0;
    for (int i = 1; i < 64; i++) if (zz[i] != '0) last_nz = 6'(i);
  end

  always_comb begin
    sym_valid = 1'b0;
    sym       = '0;
    size      = '0;
    bits      = '0;
    is_dc     = 1'b0;
    unique case (state)
      R_DC:  begin sym_valid = 1'b1; is_dc = 1'b1; sym = {4'h0, msize}; size = msize; bits = mbits; end
      R_AC:  if (!cur_zero) begin
               sym_valid = 1'b1;
               if (run >= 6'd16) sym = SYM_ZRL;
               else begin sym = {run[3:0], msize}; size = msize; bits = mbits; end
             end
      R_EOB: begin sym_valid = 1'b1; sym = SYM_EOB; end
      default: ;
    endcase
  end

  assign busy = state != R_IDLE;

  always_ff @(posedge clk) begin
    if (state == R_IDLE && start) begin
      for (int i = 0; i < 64; i++) zz[i] <= coef[ZIGZAG[i]];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= R_IDLE;
      pred  <= '0;
      n     <= '0;
      run   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (new_image && state == R_IDLE) pred <= '0;
      unique case (state)
        R_IDLE: if (start) state <= R_DC;
        R_DC:   if (sym_ready) begin
                  pred  <= zz[0];
                  n     <= 6'd1;
                  run   <= '0;
                  state <= (last_nz == 6'd0) ? R_EOB : R_AC;
                end
        R_AC:   if (cur_zero) begin
                  run <= run + 6'd1;
                  n   <= n + 6'd1;
                end else if (sym_ready) begin
                  if (run >= 6'd16) run <= run - 6'd16;
                  else begin
                    run <= '0;
                    if (n == last_nz) begin
                      if (n == 6'd63) begin state <= R_IDLE; done <= 1'b1; end
                      else state <= R_EOB;
                    end else n <= n + 6'd1;
                  end
                end
        R_EOB:  if (sym_ready) begin state <= R_IDLE; done <= 1'b1; end
        default: state <= R_IDLE;
      endcase
    end
  end

  a_sym_stable: assert property (@(posedge clk) disable iff (rst)
                  sym_valid && !sym_ready |=> sym_valid && $stable(sym) && $stable(bits));

endmodule
