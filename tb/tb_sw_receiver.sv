// tb_sw_receiver: self-checking test of the switch receiver.
// A behavioural switch sends nibble streams (honouring "stop", inserting
// "ignore" nibbles at random) and a behavioural PNC pops words from the two
// input buffers, slowly at times so that flow control must act.  Checked:
// message words arrive in order in the buffer chosen by the type, the
// checksum is verified (a corrupted message is flagged), a message for a
// busy buffer is rejected, a full buffer holds all 8 words, a long message
// passes through the 8-word FIFO
// without overrun, and Restart messages pulse `restart` only with the right
// password.
module tb_sw_receiver;
  logic clk = 0, rst = 1;
  logic [3:0] sw_data = 0;
  logic sw_frame = 0, sw_ignore = 0, sw_reject, sw_stop;
  logic hck_we = 0;
  logic [15:0] dbus = 0;
  logic [1:0] pop = 0, rel = 0, uint_req, avail, done;
  logic [1:0][15:0] head;
  logic [15:0] status;
  logic restart;
  int checks = 0, failures = 0;
  int stops = 0, restarts = 0;
  logic [15:0] got [2][$];
  int pop_rate = 100;            // percent chance per clock that the PNC pops
  logic [3:0] HCK = 4'h7;

  sw_receiver dut (.clk, .rst, .sw_data, .sw_frame, .sw_ignore, .sw_reject, .sw_stop, .hck_we, .dbus,
                   .pop, .release_buf(rel), .head, .uint_req, .data_avail(avail), .done, .status, .restart);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // behavioural PNC: pop words as they appear
  always @(posedge clk) begin
    #2;
    pop = 0;
    for (int b = 0; b < 2; b++)
      if (avail[b] && $urandom_range(1, 100) <= pop_rate) begin
        got[b].push_back(head[b]);
        pop[b] = 1;
      end
    if (sw_stop) stops++;
    if (restart) restarts++;
  end

  // send a nibble list; returns 1 if rejected
  bit obey_stop = 1;
  task automatic send(logic [3:0] nibs[$], output logic rejected);
    rejected = 0;
    foreach (nibs[i]) begin
      while ((obey_stop && sw_stop) || $urandom_range(0, 9) == 0) begin
        sw_frame = 1; sw_ignore = 1; sw_data = 4'($urandom);
        @(posedge clk); #1;
      end
      sw_frame = 1; sw_ignore = 0; sw_data = nibs[i];
      @(posedge clk); #1;
      if (sw_reject) begin rejected = 1; break; end
    end
    sw_frame = 0; sw_ignore = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;
  endtask

  function automatic void build(logic [3:0] typ, logic [15:0] words[$], logic bad,
                                ref logic [3:0] nibs[$], ref logic [15:0] expw[$]);
    logic [3:0] ck;
    logic [15:0] hdr;
    nibs.delete(); expw.delete();
    hdr = {typ, 4'h0, 8'(words.size())};
    expw.push_back(hdr);
    foreach (words[i]) expw.push_back(words[i]);
    ck = HCK;
    foreach (expw[i]) for (int n = 3; n >= 0; n--) begin
      nibs.push_back(expw[i][n*4 +: 4]); ck += expw[i][n*4 +: 4];
    end
    nibs.push_back(bad ? ck + 4'd1 : ck);
  endfunction

  task automatic run_msg(logic [3:0] typ, int len, logic bad, string name);
    logic [3:0] nibs[$]; logic [15:0] words[$], expw[$]; logic rj; int b;
    b = typ[3];
    for (int i = 0; i < len; i++) words.push_back(16'($urandom));
    build(typ, words, bad, nibs, expw);
    got[b].delete();
    send(nibs, rj);
    chk(!rj, {name, ": not rejected"});
    for (int w = 0; w < 400 && (avail[b] || w < 20); w++) @(posedge clk);
    #1;
    chk(done[b], {name, ": done"});
    chk(got[b].size() == expw.size(), $sformatf("%s: %0d words, expected %0d", name, got[b].size(), expw.size()));
    foreach (expw[i]) if (i < got[b].size()) chk(got[b][i] == expw[i], $sformatf("%s: word %0d", name, i));
    chk(status[b*8 + 6] == bad, {name, ": checksum verdict"});
    rel = 2'b01 << b; @(posedge clk); #1 rel = 0;
    chk(!status[b*8 + 4], {name, ": released"});
  endtask

  initial begin
    logic [3:0] nibs[$]; logic [15:0] expw[$]; logic rj;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    dbus = {12'h0, HCK}; hck_we = 1; @(posedge clk); #1 hck_we = 0;
    run_msg(4'h9, 3, 0, "no-reply short");
    run_msg(4'h2, 0, 0, "reply header only");
    run_msg(4'h3, 5, 1, "bad checksum");
    pop_rate = 15;
    run_msg(4'hA, 40, 0, "long slow");
    chk(stops > 0, "flow control used");
    chk(!status[14] && !status[6], "no overrun");
    // a full buffer: header and 7 data words with no word taken out, from
    // a sender that does not stop; all 8 words must be held
    pop_rate = 0; obey_stop = 0;
    begin
      logic [15:0] w[$];
      for (int i = 0; i < 7; i++) w.push_back(16'($urandom));
      build(4'hB, w, 0, nibs, expw);
      got[1].delete();
      send(nibs, rj);
      chk(!rj && done[1] && status[11:8] == 4'd8 && !status[14], $sformatf("8 words held, status %h", status));
      pop_rate = 100;
      repeat (20) @(posedge clk);
      #1 chk(got[1].size() == 8, "8 words read out");
      foreach (expw[i]) if (i < got[1].size()) chk(got[1][i] == expw[i], $sformatf("full buffer word %0d", i));
      rel = 2'b10; @(posedge clk); #1 rel = 0;
    end
    obey_stop = 1;
    // reject: hold buffer 0 busy (message done, not released) then send another
    begin
      logic [15:0] w[$]; w.push_back(16'h1111);
      build(4'h1, w, 0, nibs, expw);
      send(nibs, rj);
      chk(!rj && done[0], "first reply message accepted");
      send(nibs, rj);
      chk(rj, "second reply message rejected");
      chk(status[7], "rejection recorded");
      // buffer 1 still accepts
      build(4'hC, w, 0, nibs, expw);
      send(nibs, rj);
      chk(!rj && done[1], "other buffer accepts");
      rel = 2'b11; @(posedge clk); #1 rel = 0;
    end
    // Restart: wrong then right password
    nibs = '{4'h0, 4'h1, 4'h2, 4'h3, 4'h4};
    send(nibs, rj);
    chk(restarts == 0 && status[15], "wrong password refused");
    nibs = '{4'h0, 4'hB, 4'h8, 4'hB, 4'h1};
    send(nibs, rj);
    chk(restarts == 1 && !rj, "restart issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
