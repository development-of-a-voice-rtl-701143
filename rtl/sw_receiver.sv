// sw_receiver: Butterfly Switch receiver of the Processor Node.
//
// Messages arrive from a switch output port four bits (one nibble) per clock.
// As in the document, a finite state machine assembles them, without the
// PNC, into one of two input buffers held in a 16-word x 16-bit dual-port
// RAM: buffer 0 for message types that need a reply, buffer 1 for the others,
// so that a node waiting to send a reply can still take in other messages
// (deadlock avoidance).  If the buffer a message needs is in use the message
// is rejected.  A Restart message cannot be rejected: its 16-bit password is
// checked and, if correct, `restart` is pulsed to the rest of the node.
// Each buffer works as a 16-byte FIFO so that the PNC can unload a long
// message while it is still arriving; when a FIFO is nearly full the
// receiver raises the "stop sending data" flow-control line.  A checksum
// register is preset from the Header Checksum Register (loaded from the Data
// bus) and updated with every nibble; the final nibble is compared with it.
// A buffer asks the PNC for a microinterrupt as soon as it holds a word or
// its message is complete.
//
// Message format (this design's own; the document gives none): after the
// switch has removed the routing nibbles, nibble 0 is the message type
// (0 = Restart; bit 3 clear = reply needed).  A Restart carries 4 password
// nibbles.  Any other message is a header word (4 nibbles, most significant
// first: type, spare, length in words [7:0]) followed by `length` data words
// and one checksum nibble, the 4-bit sum of all preceding nibbles plus the
// header checksum register.  Nibbles count only while `sw_frame` is high and
// `sw_ignore` is low.  The header word is stored in the buffer too, so the
// PNC finds the message type there.
//
// PNC interface: `head[b]` is the oldest word of buffer b; `pop[b]` removes
// it; `release[b]` frees the buffer after its message is complete; `status`
// per buffer: [3:0] words held, [4] busy, [5] done, [6] checksum error; [7]
// a message was rejected, [15] a Restart with a wrong password arrived.
//
// Timing: `sw_reject` and `sw_stop` are registered.  A word is written to the
// RAM at the edge where its fourth nibble is taken and can be popped in the
// next cycle.
module sw_receiver #(
  parameter int unsigned RAM_WORDS = 16,
  parameter int unsigned BUF_WORDS = 8,
  parameter logic [15:0] PASSWORD  = 16'hB8B1
) (
  input  logic        clk,
  input  logic        rst,
  // switch output port
  input  logic [3:0]  sw_data,
  input  logic        sw_frame,
  input  logic        sw_ignore,
  output logic        sw_reject,
  output logic        sw_stop,
  // PNC side
  input  logic        hck_we,
  input  logic [15:0] dbus,
  input  logic [1:0]  pop,
  input  logic [1:0]  release_buf,
  output logic [1:0][15:0] head,
  output logic [1:0]  uint_req,
  output logic [1:0]  data_avail,
  output logic [1:0]  done,
  output logic [15:0] status,
  output logic        restart
);
  localparam int unsigned PW = $clog2(BUF_WORDS);
  localparam int unsigned CW = $clog2(BUF_WORDS+1);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DATA, S_CK, S_PW, S_DRAIN} rx_state_e;
  rx_state_e st;

  logic [15:0] ram [RAM_WORDS];
  logic [3:0]  hck, ck;
  logic [15:0] shreg;
  logic [1:0]  ncnt;            // nibbles held in the shift register
  logic        cur;             // buffer being assembled
  logic [7:0]  remaining;
  logic [1:0][PW-1:0] wptr, rptr;
  logic [1:0][CW-1:0] count;
  logic [1:0]  busy, err;
  logic        rejected_seen, badpw_seen;
  logic        nib_v;
  logic [15:0] word_now;
  logic        push;
  logic        full_cur;

  assign nib_v    = sw_frame && !sw_ignore;
  assign word_now = {shreg[11:0], sw_data};
  assign full_cur = (count[cur] == CW'(BUF_WORDS));

  for (genvar b = 0; b < 2; b++) begin : g_buf
    assign head[b]       = ram[b*BUF_WORDS + int'(rptr[b])];
    assign data_avail[b] = (count[b] != '0);
    assign uint_req[b]   = busy[b] && (data_avail[b] || done[b]);
  end

  assign status = {badpw_seen, err[1], done[1], busy[1], 4'(count[1]),
                   rejected_seen, err[0], done[0], busy[0], 4'(count[0])};

  assign push = nib_v && (ncnt == 2'd3) && (st == S_HDR || st == S_DATA);

  always_ff @(posedge clk) begin
    if (push && !full_cur) ram[int'(cur)*BUF_WORDS + int'(wptr[cur])] <= word_now;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
      hck <= '0; ck <= '0; shreg <= '0; ncnt <= '0; cur <= 1'b0; remaining <= '0;
      wptr <= '0; rptr <= '0; count <= '0; busy <= '0; done <= '0; err <= '0;
      rejected_seen <= 1'b0; badpw_seen <= 1'b0;
      sw_reject <= 1'b0; sw_stop <= 1'b0; restart <= 1'b0;
    end else begin
      restart <= 1'b0;
      if (hck_we) hck <= dbus[3:0];

      // PNC side: pop and release
      for (int b = 0; b < 2; b++) begin
        if (pop[b] && count[b] != '0) rptr[b] <= rptr[b] + 1'b1;
        if (release_buf[b] && done[b]) begin
          busy[b] <= 1'b0; done[b] <= 1'b0; err[b] <= 1'b0;
          wptr[b] <= '0; rptr[b] <= '0;
        end
      end
      for (int b = 0; b < 2; b++) begin
        automatic logic inc = push && (int'(cur) == b) && !full_cur;
        automatic logic dec = pop[b] && count[b] != '0;
        if (release_buf[b] && done[b]) count[b] <= '0;
        else if (inc && !dec) count[b] <= count[b] + 1'b1;
        else if (dec && !inc) count[b] <= count[b] - 1'b1;
      end
      if (push) begin
        if (full_cur) err[cur] <= 1'b1;          // overrun: flow control ignored
        else wptr[cur] <= wptr[cur] + 1'b1;
      end

      // flow control: stop while the buffer in use has room for less than 2 words
      sw_stop <= (st == S_HDR || st == S_DATA) && (count[cur] >= CW'(BUF_WORDS-2));

      if (nib_v) begin
        shreg <= word_now;
        ncnt  <= ncnt + 1'b1;
      end

      unique case (st)
        S_IDLE: begin
          sw_reject <= 1'b0;
          ncnt      <= '0;
          if (nib_v) begin
            shreg <= {12'h000, sw_data};
            ncnt  <= 2'd1;
            if (sw_data == 4'h0) begin
              st <= S_PW;
              ncnt <= '0;
            end else if (busy[~sw_data[3] ? 0 : 1]) begin
              sw_reject     <= 1'b1;
              rejected_seen <= 1'b1;
              st            <= S_DRAIN;
            end else begin
              cur       <= sw_data[3];
              busy[sw_data[3]] <= 1'b1;
              ck        <= hck + sw_data;
              st        <= S_HDR;
            end
          end
        end
        S_HDR: begin
          if (nib_v) begin
            ck <= ck + sw_data;
            if (ncnt == 2'd3) begin
              remaining <= word_now[7:0];
              st        <= (word_now[7:0] == 8'd0) ? S_CK : S_DATA;
            end
          end else if (!sw_frame) begin
            err[cur] <= 1'b1; done[cur] <= 1'b1; st <= S_IDLE;
          end
        end
        S_DATA: begin
          if (nib_v) begin
            ck <= ck + sw_data;
            if (ncnt == 2'd3) begin
              remaining <= remaining - 1'b1;
              if (remaining == 8'd1) st <= S_CK;
            end
          end else if (!sw_frame) begin
            err[cur] <= 1'b1; done[cur] <= 1'b1; st <= S_IDLE;
          end
        end
        S_CK: begin
          if (nib_v) begin
            if (sw_data != ck) err[cur] <= 1'b1;
            done[cur] <= 1'b1;
            st        <= S_DRAIN;
          end else if (!sw_frame) begin
            err[cur] <= 1'b1; done[cur] <= 1'b1; st <= S_IDLE;
          end
        end
        S_PW: begin
          if (nib_v && ncnt == 2'd3) begin
            if (word_now == PASSWORD) restart <= 1'b1;
            else badpw_seen <= 1'b1;
            st <= S_DRAIN;
          end else if (!sw_frame) st <= S_IDLE;
        end
        S_DRAIN: begin
          if (!sw_frame) begin
            sw_reject <= 1'b0;
            st        <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
