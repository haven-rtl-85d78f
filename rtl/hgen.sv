// hgen -- FrameLink hash generator (Bob Jenkins' Lookup2).
//
// Takes each input FrameLink frame as one byte string and answers with a one-word
// frame holding its 32-bit Lookup2 hash.  Bytes are numbered from DATA[7:0] upwards;
// on an end-of-part word only bytes 0..REM are valid.  The hash is computed as the
// frame streams in: incoming bytes are appended to a 20-byte staging buffer, and
// whenever it holds 12 bytes one Lookup2 block (add the bytes into a, b and c, then
// mix) is done in a single cycle while the input is held off.  After the last word
// the remaining 0..11 bytes and the byte count are added and a final mix gives c,
// the hash.  The state starts from a = b = 0x9e3779b9 and c = INITVAL.
//
// Interface: FrameLink sink rx_* and source tx_*, handshakes active low.  The result
// frame is one word, SOF/EOF/SOP/EOP all active, hash in DATA[31:0], upper bits zero,
// REM = 3.  Timing: 8 bytes are accepted per free cycle; each full 12-byte block
// costs one extra cycle, the final mix one cycle, and the result waits in the output
// register until taken.  One frame is hashed at a time.
// The algorithm and the FrameLink interfaces follow the source design; the
// byte-streaming structure, the output word format and INITVAL = 0 are this
// design's own choices.
module hgen
  import haven_pkg::*;
#(
  parameter logic [31:0] INITVAL = 32'h0
) (
  input  logic     clk,
  input  logic     rst,
  input  fl_word_t rx_word,
  input  logic     rx_src_rdy_n,
  output logic     rx_dst_rdy_n,
  output fl_word_t tx_word,
  output logic     tx_src_rdy_n,
  input  logic     tx_dst_rdy_n
);
  localparam int unsigned BUF_BYTES = 12 + FL_BYTES;  // 11 left over + one word, rounded up

  typedef enum logic [1:0] {S_IN, S_OUT} state_t;

  state_t      state;
  logic [7:0]  buf_q [BUF_BYTES];
  logic [4:0]  cnt;         // bytes held in buf_q
  logic [31:0] len;         // bytes of the current frame so far
  logic        last_seen;   // EOF word of the frame has been taken
  logic [31:0] a, b, c;
  logic [31:0] hash;

  logic        take;
  logic [3:0]  nbytes;
  logic [95:0] blk_mix, fin_mix;
  logic [31:0] ka, kb, kc;

  assign ka = {buf_q[3], buf_q[2], buf_q[1], buf_q[0]};
  assign kb = {buf_q[7], buf_q[6], buf_q[5], buf_q[4]};
  assign kc = {buf_q[11], buf_q[10], buf_q[9], buf_q[8]};
  // Full block: all 12 bytes.  Final block: the low byte of c is reserved for the length.
  assign blk_mix = lookup2_mix(a + ka, b + kb, c + kc);
  assign fin_mix = lookup2_mix(a + ka, b + kb, c + {kc[23:0], 8'h00} + len);

  assign rx_dst_rdy_n = !(state == S_IN && cnt < 5'd12 && !last_seen);
  assign take         = !rx_src_rdy_n && !rx_dst_rdy_n;
  assign nbytes       = rx_word.eop_n ? 4'(FL_BYTES) : 4'(rx_word.rem) + 4'd1;

  always_comb begin
    tx_word       = '0;
    tx_word.data  = {{(FL_DATA_W-32){1'b0}}, hash};
    tx_word.rem   = FL_REM_W'(3);
    tx_word.sof_n = 1'b0;
    tx_word.eof_n = 1'b0;
    tx_word.sop_n = 1'b0;
    tx_word.eop_n = 1'b0;
  end
  assign tx_src_rdy_n = (state != S_OUT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IN;
      cnt       <= '0;
      len       <= '0;
      last_seen <= 1'b0;
      a         <= LOOKUP2_GOLDEN;
      b         <= LOOKUP2_GOLDEN;
      c         <= INITVAL;
      hash      <= '0;
      for (int i = 0; i < BUF_BYTES; i++) buf_q[i] <= '0;
    end else begin
      case (state)
        S_IN: begin
          if (cnt >= 5'd12) begin
            // one full block: consume 12 bytes, shift the rest down
            {a, b, c} <= blk_mix;
            for (int i = 0; i < BUF_BYTES; i++)
              buf_q[i] <= (i + 12 < BUF_BYTES) ? buf_q[i+12] : 8'h00;
            cnt <= cnt - 5'd12;
          end else if (last_seen) begin
            hash      <= fin_mix[31:0];
            state     <= S_OUT;
            cnt       <= '0;
            len       <= '0;
            last_seen <= 1'b0;
            a         <= LOOKUP2_GOLDEN;
            b         <= LOOKUP2_GOLDEN;
            c         <= INITVAL;
            for (int i = 0; i < BUF_BYTES; i++) buf_q[i] <= '0;
          end else if (take) begin
            for (int i = 0; i < FL_BYTES; i++)
              if (i < int'(nbytes)) buf_q[int'(cnt) + i] <= rx_word.data[8*i +: 8];
            cnt <= cnt + 5'(nbytes);
            len <= len + 32'(nbytes);
            if (!rx_word.eof_n) last_seen <= 1'b1;
          end
        end
        S_OUT: if (!tx_dst_rdy_n) state <= S_IN;
        default: state <= S_IN;
      endcase
    end
  end

  a_tx_hold: assert property (@(posedge clk) disable iff (rst)
    (!tx_src_rdy_n && tx_dst_rdy_n) |=> (!tx_src_rdy_n && $stable(tx_word)));

endmodule
