// tb_sw_transmitter: self-checking test of the switch transmitter.
// A behavioural switch input port records every frame, can reject a frame
// after its first nibbles, and raises "stop" at random.  Checked: frame
// layout (path, destination, header, data) and checksum, round-robin path
// selection over the enabled paths, a message started before its data words
// are written (ignore nibbles until they are), retransmission after a
// rejection alternating between the two buffers, the buffer-sent and
// rejection microinterrupt requests and their clearing, and the PNC's
// read-back of RAM words including the spare ones, and a 21-word message
// streamed through a 6-word buffer used as a circular output FIFO.
module tb_sw_transmitter;
  logic clk = 0, rst = 1;
  logic [15:0] dbus = 0, ram_q, status;
  logic [1:0] ram_we = 0;
  logic ctl_we = 0, path_we = 0;
  logic [3:0] ram_addr = 0;
  logic [1:0] ne;
  logic [2:0] uint_req;
  logic [3:0] sw_data;
  logic sw_frame, sw_ignore, sw_reject = 0, sw_stop = 0;
  int checks = 0, failures = 0;
  int ignores = 0, stop_en = 0, reject_next = 0;
  logic [3:0] cur_f[$];
  logic [3:0] frames[$][$];
  logic [3:0] rejected_f[$][$];
  logic in_frame = 0;

  sw_transmitter dut (.clk, .rst, .dbus, .ram_we, .ram_addr, .ram_q, .ctl_we, .path_we, .not_empty(ne),
                      .uint_req, .status, .sw_data, .sw_frame, .sw_ignore, .sw_reject, .sw_stop);

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // behavioural switch
  always @(posedge clk) begin
    #2;
    if (sw_frame) begin
      in_frame = 1;
      if (sw_ignore) ignores++;
      else cur_f.push_back(sw_data);
      if (reject_next > 0 && cur_f.size() == 2) begin sw_reject = 1; reject_next--; end
    end else if (in_frame) begin
      in_frame = 0;
      if (sw_reject) rejected_f.push_back(cur_f); else frames.push_back(cur_f);
      cur_f.delete();
      sw_reject = 0;
    end
    sw_stop = (stop_en != 0) && ($urandom_range(0, 3) == 0);
  end

  task automatic wr(int a, logic [15:0] v);
    ram_addr = 4'(a); dbus = v; ram_we = 2'b11; @(posedge clk); #1 ram_we = 0;
  endtask
  task automatic ctl(logic [15:0] v);
    dbus = v; ctl_we = 1; @(posedge clk); #1 ctl_we = 0;
  endtask

  task automatic expect_frame(logic [3:0] f[$], logic [1:0] path, logic [7:0] dest,
                                       logic [15:0] w[$], string m);
    logic [3:0] e[$]; logic [3:0] ck;
    e.push_back({2'b00, path}); e.push_back(dest[7:4]); e.push_back(dest[3:0]);
    ck = dest[7:4] + dest[3:0];
    foreach (w[i]) for (int n = 3; n >= 0; n--) begin e.push_back(w[i][n*4 +: 4]); ck += w[i][n*4 +: 4]; end
    e.push_back(ck);
    chk(f.size() == e.size(), $sformatf("%s: %0d nibbles, expected %0d", m, f.size(), e.size()));
    foreach (e[i]) if (i < f.size()) chk(f[i] == e[i], $sformatf("%s: nibble %0d = %h, expected %h", m, i, f[i], e[i]));
  endtask

  task automatic wait_frames(int n);
    for (int i = 0; i < 2000 && frames.size() < n; i++) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [15:0] m0[$], m1[$];
    logic [1:0] paths[$];
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // spare words are plain storage
    wr(13, 16'hC0DE); ram_addr = 13; #1 chk(ram_q == 16'hC0DE, "spare word");
    // byte writes: high byte only, then low byte only
    ram_addr = 13; dbus = 16'h5AA5; ram_we = 2'b10; @(posedge clk); #1 ram_we = 0;
    chk(ram_q == 16'h5ADE, $sformatf("high byte write %h", ram_q));
    dbus = 16'h1234; ram_we = 2'b01; @(posedge clk); #1 ram_we = 0;
    chk(ram_q == 16'h5A34, $sformatf("low byte write %h", ram_q));
    dbus = 16'h000B; path_we = 1; @(posedge clk); #1 path_we = 0;   // paths 0, 1, 3
    paths = '{2'd0, 2'd1, 2'd3, 2'd0, 2'd1, 2'd3};
    // six single messages from alternating buffers, path rotation
    for (int k = 0; k < 6; k++) begin
      int b; b = k % 2;
      m0.delete();
      m0.push_back({4'h9, 4'h0, 8'(1 + k % 5)});
      for (int i = 0; i < 1 + k % 5; i++) m0.push_back(16'($urandom));
      foreach (m0[i]) wr(b * 6 + i, m0[i]);
      stop_en = (k >= 3);
      ctl({8'(16 + k), 6'b0, 2'(1 << b)});
      wait_frames(k + 1);
      expect_frame(frames[k], paths[k], 8'(16 + k), m0, $sformatf("msg %0d", k));
      chk(uint_req[b] && !ne[b], $sformatf("msg %0d sent flag", k));
      ctl(16'(4 << b));
      chk(!uint_req[b], "sent flag cleared");
    end
    chk(ignores > 0, "stop produced ignore nibbles");
    stop_en = 0;
    // start before the data is written
    frames.delete(); ignores = 0;
    m0.delete(); m0.push_back(16'h9003); m0.push_back(16'h1234); m0.push_back(16'h5678); m0.push_back(16'h9ABC);
    wr(0, m0[0]);
    ctl(16'h4201);
    repeat (12) @(posedge clk);
    #1 wr(1, m0[1]); wr(2, m0[2]); wr(3, m0[3]);
    wait_frames(1);
    chk(ignores >= 5, $sformatf("waited for data with ignore nibbles (%0d)", ignores));
    expect_frame(frames[0], 2'd0, 8'h42, m0, "early start");
    ctl(16'h000C);
    // two messages, first attempts rejected: transmitter alternates
    frames.delete(); rejected_f.delete();
    m0.delete(); m0.push_back(16'h9001); m0.push_back(16'hAAAA);
    m1.delete(); m1.push_back(16'h1002); m1.push_back(16'hBBBB); m1.push_back(16'hCCCC);
    foreach (m0[i]) wr(i, m0[i]);
    foreach (m1[i]) wr(6 + i, m1[i]);
    reject_next = 3;
    ctl(16'h5503);
    wait_frames(2);
    chk(rejected_f.size() == 3, $sformatf("three rejections (%0d)", rejected_f.size()));
    // the switch rejects after two nibbles; the frame must end at once
    chk(rejected_f.size() >= 2 && rejected_f[0].size() == 2 && rejected_f[1].size() == 2 &&
        rejected_f[0][1] == 4'h5 && rejected_f[1][1] == 4'h5, "rejected frames ended at once");
    chk(frames.size() == 2 && ne == 2'b00 && uint_req == 3'b111, "both sent after retries");
    // buffer 0 was sent last, so buffer 1 goes first: attempts 1,0,1 are
    // rejected, then 0 (path 1) and 1 (path 3) get through
    if (frames.size() == 2) begin
      expect_frame(frames[0], 2'd1, 8'h55, m0, "retry buffer 0");
      expect_frame(frames[1], 2'd3, 8'h55, m1, "retry buffer 1");
    end
    ctl(16'h001C);
    chk(uint_req == 3'b000, "all flags cleared");
    // a long message (20 data words) through the 6-word buffer 1 used as a
    // circular FIFO: the PNC refills each word as soon as it is freed
    frames.delete();
    stop_en = 1;
    m1.delete(); m1.push_back(16'h9014);
    for (int i = 0; i < 20; i++) m1.push_back(16'($urandom));
    for (int i = 0; i < 6; i++) wr(6 + i, m1[i]);
    ctl(16'h7702);
    repeat (2) @(posedge clk);
    #1;
    for (int n = 6; n < m1.size(); n++) begin
      int t; t = 0;
      while (status[10 + n % 6] && t < 500) begin @(posedge clk); #1 t++; end
      wr(6 + n % 6, m1[n]);
    end
    wait_frames(1);
    stop_en = 0;
    if (frames.size() == 1) expect_frame(frames[0], 2'd0, 8'h77, m1, "long message");
    else chk(0, "long message sent");
    chk(uint_req[1] && ne == 2'b00, "long message sent flag");
    ctl(16'h0008);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
