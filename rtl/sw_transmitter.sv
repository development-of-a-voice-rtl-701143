// sw_transmitter: Butterfly Switch transmitter of the Processor Node.
//
// Mirrors the receiver.  The PNC assembles messages in two output buffers in
// a 16-word x 16-bit dual-port RAM (words 0-5 buffer 0, words 6-11 buffer 1;
// words 12-15 are spare storage for the PNC, as in the document) and sets a
// per-buffer "not empty" flip-flop.  In its idle state the transmitter's
// finite state machine senses a set flip-flop and sends the message one
// nibble per clock; at the end it clears the flip-flop.  It has full
// responsibility, without the PNC, for
//   * retransmission when the switch rejects the message,
//   * fairness: with both buffers non-empty it alternates between them on
//     each rejection (and after each completed message),
//   * alternate path selection: every transmission takes the next path,
//     round-robin, among those enabled in the 4-bit Path Enable register,
//   * checksum generation, and
//   * flow control: while the switch says "stop sending data", or while the
//     next word has not yet been written by the PNC (the message may be
//     started before its data is loaded), it sends nibbles marked "ignore".
// `uint_req` asks the PNC for a microinterrupt when a buffer has been sent
// (bits 1:0) or a rejection has been seen (bit 2).
//
// Frame format (this design's own; the document gives none): a path nibble
// {00, path}, the destination node number (2 nibbles), the header word
// (4 nibbles: type, spare, length in words [7:0]), `length` data words
// (most significant nibble first), then a checksum nibble: the 4-bit sum of
// every nibble after the path nibble.
//
// Long messages: a message of up to 5 data words fits its buffer and stays
// there until it has been sent, so a rejection is retried without the PNC.
// A longer one (up to 255 data words) uses its buffer as a circular output
// FIFO, as in the document: the message can be started with only its first
// words loaded, every word is freed as soon as its last nibble has gone, and
// the PNC refills the freed word with the next one (status[15:10] shows
// which words of the buffer being sent are still occupied).  If such a
// message is rejected, the PNC must load it again from the header.
//
// PNC interface: `ram_we`/`ram_addr`/`dbus` write the high byte (ram_we[1]),
// the low byte (ram_we[0]) or both of a word, and mark it written; `ram_q`
// reads one;
// `ctl_we` with dbus: [0]/[1] set not-empty for buffer 0/1 with destination
// dbus[15:8], [2]/[3] clear the buffer-sent flags, [4] clear the rejection
// flag; `path_we` loads the Path Enable register from dbus[3:0].
//
// Status: [1:0] sent, [2] rejection seen, [5:4] not empty, [6] preferred
// buffer, [9:8] last path, [15:10] occupied words of the buffer being sent;
// bits 3 and 7 read 0.
//
// Timing: switch outputs are registered; a rejection ends the frame on the
// next clock, and the message is retried from its start.
module sw_transmitter #(
  parameter int unsigned RAM_WORDS = 16,
  parameter int unsigned BUF_WORDS = 6
) (
  input  logic        clk,
  input  logic        rst,
  // PNC side
  input  logic [15:0] dbus,
  input  logic [1:0]  ram_we,
  input  logic [3:0]  ram_addr,
  output logic [15:0] ram_q,
  input  logic        ctl_we,
  input  logic        path_we,
  output logic [1:0]  not_empty,
  output logic [2:0]  uint_req,
  output logic [15:0] status,
  // switch input port
  output logic [3:0]  sw_data,
  output logic        sw_frame,
  output logic        sw_ignore,
  input  logic        sw_reject,
  input  logic        sw_stop
);
  typedef enum logic [1:0] {T_IDLE, T_SEND, T_END} tx_state_e;
  tx_state_e st;

  logic [15:0] ram [RAM_WORDS];
  logic [RAM_WORDS-1:0] wvalid;    // word written since the buffer was last sent
  logic [1:0][7:0] dest;
  logic [1:0]  sent;
  logic        rej_seen;
  logic [3:0]  path_en;
  logic [1:0]  last_path, path, next_path;
  logic        path_ok;
  logic        pref;               // buffer to try first
  logic        cur;
  logic [10:0] pos;                // nibble index within the frame
  logic [10:0] last_pos;           // index of the checksum nibble
  localparam int unsigned SW = $clog2(BUF_WORDS);
  logic [SW-1:0] wslot;            // buffer word of the current data nibble
  logic        long_msg;           // message longer than its buffer: circular use
  logic [5:0]  slot_valid;         // valid bits of the buffer being sent, for status
  logic [3:0]  ck;
  logic [3:0]  widx;               // RAM word of the current nibble
  logic [3:0]  nib;
  logic        word_ok;
  logic        pick_ok, pick;

  assign ram_q = ram[ram_addr];

  always_ff @(posedge clk) begin
    if (ram_we[1]) ram[ram_addr][15:8] <= dbus[15:8];
    if (ram_we[0]) ram[ram_addr][7:0]  <= dbus[7:0];
  end

  // next enabled path after the last one used
  always_comb begin
    path_ok   = 1'b0;
    next_path = last_path;
    for (int k = 1; k <= 4; k++) begin
      automatic logic [1:0] j = last_path + 2'(k);
      if (!path_ok && path_en[j]) begin
        path_ok   = 1'b1;
        next_path = j;
      end
    end
  end

  // buffer choice: the preferred one if not empty, else the other
  always_comb begin
    pick_ok = |not_empty;
    pick    = not_empty[pref] ? pref : ~pref;
  end

  // data/checksum multiplexer
  always_comb begin
    automatic logic [1:0] p = pos[1:0] - 2'd3;  // nibble within the word
    widx    = 4'(int'(cur) * BUF_WORDS) + 4'(wslot);
    word_ok = 1'b1;
    nib     = 4'h0;
    if (pos == 11'd0)      nib = {2'b00, path};
    else if (pos == 11'd1) nib = dest[cur][7:4];
    else if (pos == 11'd2) nib = dest[cur][3:0];
    else if (pos == last_pos) nib = ck;
    else begin
      word_ok = wvalid[widx];
      unique case (p[1:0])
        2'd0: nib = ram[widx][15:12];
        2'd1: nib = ram[widx][11:8];
        2'd2: nib = ram[widx][7:4];
        default: nib = ram[widx][3:0];
      endcase
    end
  end

  assign uint_req = {rej_seen, sent};
  always_comb begin
    slot_valid = '0;
    for (int w = 0; w < BUF_WORDS && w < 6; w++) slot_valid[w] = wvalid[int'(cur) * BUF_WORDS + w];
  end
  assign status   = {slot_valid, last_path, 1'b0, pref, not_empty, 1'b0, rej_seen, sent};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_IDLE;
      wvalid <= '0; dest <= '0; not_empty <= '0; sent <= '0; rej_seen <= 1'b0;
      path_en <= '0; last_path <= 2'd3; path <= '0; pref <= 1'b0; cur <= 1'b0;
      pos <= '0; last_pos <= '0; ck <= '0; wslot <= '0; long_msg <= 1'b0;
      sw_data <= '0; sw_frame <= 1'b0; sw_ignore <= 1'b0;
    end else begin
      if (|ram_we) wvalid[ram_addr] <= 1'b1;
      if (path_we) path_en <= dbus[3:0];
      if (ctl_we) begin
        for (int b = 0; b < 2; b++)
          if (dbus[b]) begin not_empty[b] <= 1'b1; dest[b] <= dbus[15:8]; end
        if (dbus[2]) sent[0] <= 1'b0;
        if (dbus[3]) sent[1] <= 1'b0;
        if (dbus[4]) rej_seen <= 1'b0;
      end

      unique case (st)
        T_IDLE: begin
          sw_frame  <= 1'b0;
          sw_ignore <= 1'b0;
          sw_data   <= '0;
          if (pick_ok && path_ok && !sw_reject) begin
            cur       <= pick;
            path      <= next_path;
            last_path <= next_path;
            pos       <= '0;
            wslot     <= '0;
            last_pos  <= 11'd7 + {1'b0, ram[int'(pick) * BUF_WORDS][7:0], 2'b00};
            long_msg  <= (32'(ram[int'(pick) * BUF_WORDS][7:0]) + 1 > BUF_WORDS);
            ck        <= '0;
            st        <= T_SEND;
          end
        end
        T_SEND: begin
          if (sw_reject && sw_frame) begin
            // rejected: end the frame; try the other buffer first if it has a message
            sw_frame  <= 1'b0;
            sw_ignore <= 1'b0;
            rej_seen  <= 1'b1;
            if (not_empty[~cur]) pref <= ~cur;
            st        <= T_END;
          end else if (sw_stop || !word_ok) begin
            sw_frame  <= 1'b1;
            sw_ignore <= 1'b1;
          end else begin
            sw_frame  <= 1'b1;
            sw_ignore <= 1'b0;
            sw_data   <= nib;
            if (pos != 11'd0 && pos != last_pos) ck <= ck + nib;
            pos <= pos + 1'b1;
            // last nibble of a buffer word: step to the next word; in a long
            // message the word is freed at once for the PNC to refill
            if (pos >= 11'd3 && pos != last_pos && (pos[1:0] == 2'd2)) begin
              wslot <= (32'(wslot) == BUF_WORDS-1) ? '0 : wslot + 1'b1;
              if (long_msg) wvalid[widx] <= 1'b0;
            end
            if (pos == last_pos) begin
              not_empty[cur] <= 1'b0;
              sent[cur]      <= 1'b1;
              pref           <= ~cur;
              for (int w = 0; w < BUF_WORDS; w++)
                wvalid[int'(cur) * BUF_WORDS + w] <= 1'b0;
              st <= T_END;
            end
          end
        end
        T_END: begin
          // one idle clock between frames
          sw_frame  <= 1'b0;
          sw_ignore <= 1'b0;
          sw_data   <= '0;
          st        <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
