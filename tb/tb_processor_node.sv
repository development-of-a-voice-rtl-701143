// tb_processor_node: end-to-end test of the Processor Node at its default
// size (four 128 KB memory modules, 1K-word control store, 512 SARs).
//
// The control store is loaded with a small set of microprograms; the
// transmitter's switch port is looped back to the receiver's through a
// behavioural switch that strips the three routing nibbles and rejects the
// first attempt.  A small microprogram does all node-side work; the memory is
// checked through hierarchical references.  The run covers:
//   * setup by microcode: Path Enable, memory to normal mode, header
//     checksum, SARs for two segments (one without access), an MC68000
//     interrupt request at level 5;
//   * a message started before its data words are loaded (the transmitter
//     sends "ignore" nibbles), rejected once and retransmitted on the next
//     path, received into input buffer 1 and stored word by word into local
//     memory by the receiver's service routine, then the buffer released;
//   * a second message, its header written as two byte writes, from output
//     buffer 1 to input buffer 0; the switch holds it with "stop sending
//     data" for a few clocks, and a deliberately slow service routine reads
//     it out;
//   * a long message (11 words) from another node entering at the
//     receiver: the 8-word input FIFO fills, the receiver raises "stop
//     sending data", and the sender honours it;
//   * an MC68000 read of that memory through the MMU (translation, access
//     PLA, DTACK) and a read from a protected segment (bus error); the
//     local read and a local write must each take 5 clocks (0.625 us at
//     8 MHz, as in the original's execution-time table);
//   * an MC68000 read from the bootstrap ROM (two byte reads); it takes 21
//     clocks here against 2 us in that table, and the count is checked;
//   * an MC68000 local write (5 clocks, read back) and an interrupt
//     acknowledge cycle for level 5, whose routine supplies the vector and
//     withdraws the request;
//   * a BIOLINK controller reading local memory through the adapter;
//   * a Restart message with the right password, which resets the node and
//     puts the memory back into self-refresh mode.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_processor_node;
  import pn_pkg::*;
  logic clk = 0, rst = 1;
  logic cpu_as = 0, cpu_rw = 1, cpu_user = 0, cpu_iack = 0;
  logic [23:0] cpu_va = 0;
  logic [15:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_dtack, cpu_berr, cpu_br;
  logic [2:0] cpu_ipl;
  logic [11:0] rom_addr;
  logic rom_oe;
  logic [7:0] rom_data;
  logic [15:0] bio_ad_out, bio_ad_in = 0;
  logic bio_ad_oe, bio_strobe = 0, bio_dev_ack = 0, bio_ack;
  logic [3:0] bio_addr_hi = 0, bio_dma_req = 0, bio_grant, bio_lines;
  logic [3:0] rx_data = 0, tx_data;
  logic rx_frame = 0, rx_ignore = 0, rx_reject, rx_stop;
  logic tx_frame, tx_ignore, tx_reject = 0, tx_stop;
  logic cs_we = 0;
  logic [9:0] cs_addr = 0;
  logic [63:0] cs_data = 0;
  logic restart_out;
  logic inject = 0;
  logic [3:0] inj_data = 0;
  logic inj_frame = 0, inj_ignore = 0;
  int n_rxstop = 0;
  int checks = 0, failures = 0;
  int n_uint = 0, n_reject = 0, n_ignore = 0, n_rxdone = 0, n_dtack = 0, n_berr = 0,
      n_rom = 0, n_dma = 0, n_restart = 0, n_irq = 0, n_stop = 0, n_romwait = 0, n_br = 0, n_iack = 0;
  int paths [$];

  processor_node dut (
    .clk, .rst, .cpu_as, .cpu_va, .cpu_rw, .cpu_user, .cpu_iack, .cpu_wdata, .cpu_rdata, .cpu_dtack, .cpu_berr,
    .cpu_ipl, .cpu_br, .rom_addr, .rom_oe, .rom_data,
    .bio_ad_out, .bio_ad_oe, .bio_ad_in, .bio_addr_hi, .bio_dma_req, .bio_strobe, .bio_dev_ack,
    .bio_irq_hi(1'b0), .bio_irq_lo(1'b0), .bio_grant, .bio_ack, .bio_lines,
    .rx_data(inject ? inj_data : rx_data), .rx_frame(inject ? inj_frame : rx_frame),
    .rx_ignore(inject ? inj_ignore : rx_ignore), .rx_reject, .rx_stop,
    .tx_data, .tx_frame, .tx_ignore, .tx_reject, .tx_stop,
    .cs_prog_we(cs_we), .cs_prog_addr(cs_addr), .cs_prog_data(cs_data), .restart_out);

  eprom_model #(.ABITS(12)) u_rom (.addr(rom_addr), .oe(rom_oe), .data(rom_data));

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic logic [63:0] U(seq_op_e sq, int addr, bus_src_e bs, bus_dst_e bd, logic [15:0] k,
                                    int b = 0, logic sp = 0, logic [4:0] cond = 0,
                                    alu_fn_e fn = AF_ADD, alu_src_e src = AS_AQ, alu_dst_e dst = AD_NOP,
                                    int a = 0);
    uword_t w;
    w = '0;
    w.seq = sq; w.addr = 10'(addr); w.cond = cond; w.sar_prot = sp; w.alu_fn = fn; w.alu_src = src;
    w.alu_dst = dst; w.a_addr = 5'(a); w.b_addr = 5'(b); w.bus_src = bs; w.bus_dst = bd; w.k = k;
    return 64'(w);
  endfunction

  task automatic P(int a, logic [63:0] d);
    cs_addr = 10'(a); cs_data = d; cs_we = 1; @(posedge clk); #1 cs_we = 0;
  endtask

  // ---------------------------------------------------- behavioural switch
  int idx = 0, frames = 0;
  logic rejecting = 0;
  always @(posedge clk) begin
    if (rst) begin
      idx = 0; frames = 0; rejecting = 0;
      rx_frame <= 1'b0; rx_ignore <= 1'b0; tx_reject <= 1'b0;
    end else if (tx_frame && !rejecting) begin
      if (!tx_ignore) begin
        if (idx == 0) paths.push_back(int'(tx_data[1:0]));
        if (idx < 3) rx_frame <= 1'b0;
        else begin rx_frame <= 1'b1; rx_ignore <= 1'b0; rx_data <= tx_data; end
        idx++;
        if (frames == 0 && idx == 2) begin tx_reject <= 1'b1; rejecting = 1; n_reject++; end
      end else begin
        rx_frame <= (idx >= 3); rx_ignore <= 1'b1; n_ignore++;
      end
    end else begin
      if (idx != 0) frames++;
      idx = 0;
      rx_frame <= 1'b0; rx_ignore <= 1'b0;
      if (!tx_frame) begin rejecting = 0; tx_reject <= 1'b0; end
    end
  end
  // the switch also holds the third frame for a few clocks, as it would when
  // the destination's input FIFO is filling
  logic sw_hold = 0;
  int hold_cnt = 0;
  always @(posedge clk) begin
    if (rst) begin sw_hold <= 1'b0; hold_cnt = 0; end
    else if (frames == 2 && idx == 6 && hold_cnt == 0) begin sw_hold <= 1'b1; hold_cnt = 1; end
    else if (hold_cnt > 0 && hold_cnt < 5) hold_cnt++;
    else if (hold_cnt == 5) begin sw_hold <= 1'b0; hold_cnt = 6; end
  end
  assign tx_stop = rx_stop | sw_hold;

  always @(posedge clk) if (!rst) begin
    if (dut.u_pnc.uint_taken) n_uint++;
    if (cpu_dtack) n_dtack++;
    if (cpu_berr) n_berr++;
    if (dut.u_rom.done) n_rom++;
    if (bio_ack) n_dma++;
    if (restart_out) n_restart++;
    if (dut.rx_done[1] && dut.u_rx.st == 3'd5) n_rxdone++;
    if (tx_stop && tx_frame) n_stop++;
    if (dut.u_pnc.upc == 10'd705) n_romwait++;
    if (cpu_br) n_br++;
    if (cpu_iack && cpu_dtack) n_iack++;
    if (inject && rx_stop) n_rxstop++;
  end

  localparam int IDLE = 40;
  localparam logic [15:0] HDR = 16'h9003;
  localparam logic [15:0] IACK_VEC = 16'h0045;  // vector for the level-5 request
  localparam logic [15:0] HDR2 = 16'h1005;
  logic [15:0] DATA [3] = '{16'h1111, 16'h2222, 16'h3333};

  // a message from another node, entering at the receiver; it honours the
  // receiver's "stop sending data" line by sending ignore nibbles
  task automatic inject_msg(logic [3:0] nibs [$]);
    int i;
    inject = 1; i = 0;
    while (i < nibs.size()) begin
      inj_frame = 1;
      if (rx_stop) inj_ignore = 1;
      else begin inj_ignore = 0; inj_data = nibs[i]; i++; end
      @(posedge clk); #1;
    end
    inj_frame = 0; inj_ignore = 0;
    repeat (2) @(posedge clk);
    #1 inject = 0;
  endtask

  int rd_clocks;  // clocks from address strobe to DTACK or bus error, last read
  task automatic cpu_read(logic [23:0] va, output logic [15:0] d, output logic ok);
    int w;
    cpu_va = va; cpu_rw = 1; cpu_as = 1;
    w = 0;
    while (!cpu_dtack && !cpu_berr && w < 200) begin @(posedge clk); #1 w++; end
    ok = cpu_dtack; d = cpu_rdata; rd_clocks = w;
    cpu_as = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic cpu_write(logic [23:0] va, logic [15:0] d, output logic ok);
    int w;
    cpu_va = va; cpu_wdata = d; cpu_rw = 0; cpu_as = 1;
    w = 0;
    while (!cpu_dtack && !cpu_berr && w < 200) begin @(posedge clk); #1 w++; end
    ok = cpu_dtack; rd_clocks = w;
    cpu_as = 0; cpu_rw = 1;
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [15:0] d; logic ok;
    // ------------------------------------------------ microcode
    // setup
    P(0,  U(SQ_CONT, 0, BS_K, BD_PATHEN, 16'h0005));
    P(1,  U(SQ_CONT, 0, BS_K, BD_MEMCTL, 16'h0001));
    P(2,  U(SQ_CONT, 0, BS_K, BD_HCKSUM, 16'h0008));        // 3 + 5 for node 0x35
    P(3,  U(SQ_CONT, 0, BS_K, BD_NONE, 16'h0100, 1, 0, 0, AF_OR, AS_DZ, AD_RAMF));  // R1 = 0x100
    P(4,  U(SQ_CONT, 0, BS_K, BD_BUSREQ, 16'h0001));
    P(5,  U(SQ_CONT, 0, BS_K, BD_AR, 16'h0200));            // segment 2
    P(6,  U(SQ_CONT, 0, BS_K, BD_ASAR, 16'h0000));
    P(7,  U(SQ_CONT, 0, BS_K, BD_SARW, 16'h0000, 0, 0));    // relocation: local, +0
    P(8,  U(SQ_CONT, 0, BS_K, BD_SARW, 16'hFF0F, 0, 1));    // protection: all, 256 pages
    P(9,  U(SQ_CONT, 0, BS_K, BD_AR, 16'h0300));            // segment 3
    P(10, U(SQ_CONT, 0, BS_K, BD_SARW, 16'h0000, 0, 0));
    P(11, U(SQ_CONT, 0, BS_K, BD_SARW, 16'h0000, 0, 1));    // no access
    P(12, U(SQ_CONT, 0, BS_K, BD_BUSREQ, 16'h0000));
    P(13, U(SQ_CONT, 0, BS_K, BD_IRQSET, 16'h0010));        // level 5
    // message: header first, start, then data after a delay
    P(14, U(SQ_CONT, 0, BS_K, BD_TXRAM, HDR, 0));
    P(15, U(SQ_CONT, 0, BS_K, BD_TXCTL, 16'h3501));
    P(16, U(SQ_CONT, 0, BS_K, BD_NONE, 16'd12, 0, 0, 0, AF_OR, AS_DZ, AD_RAMF));   // R0 = 12
    P(17, U(SQ_JCOND, 17, BS_K, BD_NONE, 16'd1, 0, 0, C_NZ, AF_SUBR, AS_DA, AD_RAMF, 0));
    P(18, U(SQ_CONT, 0, BS_K, BD_TXRAM, DATA[0], 1));
    P(19, U(SQ_CONT, 0, BS_K, BD_TXRAM, DATA[1], 2));
    P(20, U(SQ_CONT, 0, BS_K, BD_TXRAM, DATA[2], 3));
    P(IDLE, U(SQ_DISP, IDLE, BS_NONE, BD_NONE, 0));
    P(21, U(SQ_JUMP, IDLE, BS_NONE, BD_NONE, 0));
    // receiver buffer 1 (request 1)
    P(528, U(SQ_JCOND, 531, BS_NONE, BD_NONE, 0, 0, 0, C_RX1));
    P(529, U(SQ_JCOND, 536, BS_NONE, BD_NONE, 0, 0, 0, C_RXD1));
    P(530, U(SQ_DISP, IDLE, BS_NONE, BD_NONE, 0));
    P(531, U(SQ_CONT, 0, BS_REGA, BD_MEMA_WW, 0, 0, 0, 0, AF_ADD, AS_AQ, AD_NOP, 1));
    P(532, U(SQ_CONT, 0, BS_RXPOP1, BD_MEMW, 0));
    P(533, U(SQ_CONT, 0, BS_K, BD_NONE, 16'd2, 1, 0, 0, AF_ADD, AS_DA, AD_RAMF, 1));
    P(534, U(SQ_DISP, IDLE, BS_NONE, BD_NONE, 0));
    P(536, U(SQ_DISP, IDLE, BS_K, BD_RXCTL, 16'h0002));
    // transmitter: buffer 0 sent (request 2), rejection seen (request 4)
    P(544, U(SQ_CONT, 0, BS_K, BD_TXCTL, 16'h0004));
    // second message, from buffer 1 to input buffer 0, started once the
    // first one has gone
    P(545, U(SQ_CONT, 0, BS_K, BD_NONE, 16'h0200, 3, 0, 0, AF_OR, AS_DZ, AD_RAMF));  // R3 = 0x200
    P(546, U(SQ_CONT, 0, BS_K, BD_TXRAMH, HDR2, 6));              // header in two byte writes
    for (int i = 0; i < 5; i++) P(547 + i, U(SQ_CONT, 0, BS_K, BD_TXRAM, 16'hA001 + 16'(i), 7 + i));
    P(552, U(SQ_CONT, 0, BS_K, BD_TXRAML, HDR2, 6));
    P(553, U(SQ_CONT, 0, BS_K, BD_TXCTL, 16'h3502));
    P(554, U(SQ_JUMP, IDLE, BS_NONE, BD_NONE, 0));
    P(560, U(SQ_DISP, IDLE, BS_K, BD_TXCTL, 16'h0008));
    // receiver buffer 0 (request 0): a slow consumer, about 40 clocks a word
    P(512, U(SQ_CONT, 0, BS_K, BD_NONE, 16'd40, 2, 0, 0, AF_OR, AS_DZ, AD_RAMF));
    P(513, U(SQ_JCOND, 513, BS_K, BD_NONE, 16'd1, 2, 0, C_NZ, AF_SUBR, AS_DA, AD_RAMF, 2));
    P(514, U(SQ_JCOND, 517, BS_NONE, BD_NONE, 0, 0, 0, C_RX0));
    P(515, U(SQ_JCOND, 520, BS_NONE, BD_NONE, 0, 0, 0, C_RXD0));
    P(516, U(SQ_DISP, IDLE, BS_NONE, BD_NONE, 0));
    P(517, U(SQ_CONT, 0, BS_REGA, BD_MEMA_WW, 0, 0, 0, 0, AF_ADD, AS_AQ, AD_NOP, 3));
    P(518, U(SQ_CONT, 0, BS_RXPOP0, BD_MEMW, 0));
    P(519, U(SQ_DISP, IDLE, BS_K, BD_NONE, 16'd2, 3, 0, 0, AF_ADD, AS_DA, AD_RAMF, 3));
    P(520, U(SQ_DISP, IDLE, BS_K, BD_RXCTL, 16'h0001));
    P(576, U(SQ_DISP, IDLE, BS_K, BD_TXCTL, 16'h0010));
    // BIOLINK memory read for a controller (request 5)
    P(592, U(SQ_CONT, 0, BS_IOIN, BD_MEMA_RD, 0, 2));
    P(593, U(SQ_CONT, 0, BS_NONE, BD_NONE, 0));
    P(594, U(SQ_CONT, 0, BS_MEM, BD_IOOUT, 0));
    P(595, U(SQ_DISP, IDLE, BS_K, BD_IOCTL, 16'h0060));
    // MC68000 local memory read or write (request 8); a write starts a read
    // cycle that is never used, then overlaps the write cycle with it
    P(640, U(SQ_JCOND, 648, BS_PADDR, BD_MEMA_RD, 0, 1, 0, C_CPUWR));
    P(641, U(SQ_JCOND, 646, BS_NONE, BD_NONE, 0, 0, 1, C_PROT));
    P(642, U(SQ_CONT, 0, BS_MEM, BD_CPUD, 0));
    P(643, U(SQ_DISP, IDLE, BS_NONE, BD_CPUACK, 0));
    P(646, U(SQ_DISP, IDLE, BS_NONE, BD_CPUACK, 0, 0, 1));
    // supervisor write without a protection check: the original's table lists
    // "check user mode write" as a separate, slower operation, and the SAR
    // RAM gives one half per microstep, so a check would cost a step here
    P(648, U(SQ_CONT, 0, BS_PADDR, BD_MEMA_WW, 0, 1));
    P(649, U(SQ_CONT, 0, BS_CPUD, BD_MEMW, 0));
    P(650, U(SQ_DISP, IDLE, BS_NONE, BD_CPUACK, 0));
    // MC68000 interrupt acknowledge (request 13): the only request in this
    // test is the microcode-set level 5, so the PNC supplies its vector
    // itself and withdraws the request
    P(720, U(SQ_CONT, 0, BS_K, BD_CPUD, IACK_VEC));
    P(721, U(SQ_CONT, 0, BS_K, BD_IRQSET, 16'h0000));
    P(722, U(SQ_DISP, IDLE, BS_NONE, BD_CPUACK, 0));
    // MC68000 ROM read (request 12)
    P(704, U(SQ_CONT, 0, BS_PADDR, BD_ROMRD, 0));
    P(705, U(SQ_JCOND, 705, BS_NONE, BD_NONE, 0, 0, 0, C_ROMBSY));
    P(706, U(SQ_CONT, 0, BS_ROM, BD_CPUD, 0));
    P(707, U(SQ_DISP, IDLE, BS_NONE, BD_CPUACK, 0));

    repeat (2) @(posedge clk);
    #1 rst = 0;
    // ------------------------------------------------ message loop-back
    begin
      int w; w = 0;
      while (!(dut.u_rx.status[12] == 1'b0 && dut.u_rx.status[5:4] == 2'b00 && dut.u_tx.status[1:0] == 2'b00 && n_rxdone > 0 &&
               dut.u_tx.not_empty == 0 && dut.u_pnc.u_alu.regs[3] == 16'h020C) && w < 5000) begin
        @(posedge clk); #1 w++;
      end
    end
    repeat (10) @(posedge clk);
    #1;
    chk(cpu_ipl == 3'd5, "level 5 interrupt presented");
    if (cpu_ipl == 3'd5) n_irq++;
    chk(dut.g_mem[0].u_mem.mem[16'h80][15:0] == HDR, "header stored in memory");
    for (int i = 0; i < 3; i++)
      chk(dut.g_mem[0].u_mem.mem[16'h81 + i][15:0] == DATA[i], $sformatf("data word %0d stored", i));
    chk(dut.u_pnc.u_alu.regs[1] == 16'h0108, "pointer advanced by four words");
    chk(dut.u_rx.status[13:12] == 2'b00, "buffer 1 released");
    chk(dut.u_tx.status[1:0] == 2'b00 && dut.u_tx.status[2] == 1'b0, $sformatf("transmitter flags cleared %h", dut.u_tx.status));
    chk(paths.size() == 3 && paths[0] == 0 && paths[1] == 2 && paths[2] == 0,
        $sformatf("paths used %p: rejected on 0, retried on 2, next message on 0", paths));
    chk(dut.g_mem[0].u_mem.mem[16'h100][15:0] == HDR2, "second header stored");
    for (int i = 0; i < 5; i++)
      chk(dut.g_mem[0].u_mem.mem[16'h101 + i][15:0] == 16'hA001 + 16'(i), $sformatf("second message word %0d", i));
    // ------------------------------------------------ MC68000 through the MMU
    cpu_read(24'h020102, d, ok);
    chk(ok && d == DATA[0], $sformatf("CPU local read %h", d));
    // the execution-time table gives 0.625 us for a local read: 5 clocks at 8 MHz
    chk(rd_clocks == 5, $sformatf("local read took %0d clocks", rd_clocks));
    cpu_read(24'h020106, d, ok);
    chk(ok && d == DATA[2], $sformatf("CPU local read %h", d));
    cpu_read(24'h030100, d, ok);
    chk(!ok && n_berr == 1, "protected segment gives bus error");
    cpu_read(24'hFF8024, d, ok);
    chk(ok && d == {8'(12'h024 * 37 + (12'h024 >> 5)), 8'(12'h025 * 37 + (12'h025 >> 5))}, $sformatf("ROM read %h", d));
    // the table gives 2.0 us for a ROM read; this microprogram and ROM timing
    // take 21 clocks (2.625 us), a known departure checked here so it cannot drift
    chk(rd_clocks == 21, $sformatf("ROM read took %0d clocks", rd_clocks));
    // local write: also 0.625 us (5 clocks) in the table; read it back.  The
    // routine's first microstep reads the word it then overwrites, so the
    // target must already hold good parity (here a word of the first message)
    cpu_write(24'h020106, 16'h5AC3, ok);
    chk(ok && rd_clocks == 5, $sformatf("local write took %0d clocks", rd_clocks));
    chk(dut.g_mem[0].u_mem.mem[16'h83][15:0] == 16'h5AC3, "local write reached memory");
    cpu_read(24'h020106, d, ok);
    chk(ok && d == 16'h5AC3, $sformatf("written word read back %h", d));
    // interrupt acknowledge for level 5 (address bits 3:1 carry the level)
    cpu_iack = 1;
    cpu_read(24'hFFFFFB, d, ok);
    cpu_iack = 0;
    chk(ok && d[7:0] == IACK_VEC[7:0], $sformatf("interrupt vector %h", d));
    chk(cpu_ipl == 3'd0, "level 5 withdrawn by the acknowledge routine");
    // ------------------------------------------------ BIOLINK controller reads memory
    bio_dma_req = 4'b0100;
    begin
      int w; w = 0;
      while (bio_grant != 4'b0100 && w < 50) begin @(posedge clk); #1 w++; end
      bio_ad_in = 16'h0104; bio_addr_hi = 4'h0; bio_strobe = 1; @(posedge clk); #1 bio_strobe = 0;
      w = 0;
      while (!bio_ack && w < 50) begin @(posedge clk); #1 w++; end
      chk(bio_ack && bio_ad_oe && bio_ad_out == DATA[1], $sformatf("DMA read %h", bio_ad_out));
      bio_dma_req = 0;
    end
    // ------------------------------------------------ long message from another node
    begin
      logic [3:0] nibs [$];
      logic [3:0] ck;
      logic [15:0] w;
      int t;
      ck = 4'h8;
      for (int i = 0; i < 11; i++) begin
        w = (i == 0) ? 16'h200A : 16'hB000 + 16'(i);
        for (int n = 3; n >= 0; n--) begin nibs.push_back(w[n*4 +: 4]); ck += w[n*4 +: 4]; end
      end
      nibs.push_back(ck);
      inject_msg(nibs);
      t = 0;
      while (!(dut.u_rx.status[5:4] == 2'b00 && dut.u_pnc.u_alu.regs[3] == 16'h0222) && t < 5000) begin
        @(posedge clk); #1 t++;
      end
      repeat (60) @(posedge clk);
      #1;
      chk(dut.u_rx.status[5:4] == 2'b00 && dut.u_rx.status[6] == 1'b0, "long message received and released");
      chk(dut.g_mem[0].u_mem.mem[16'h106][15:0] == 16'h200A, "long message header stored");
      for (int i = 1; i < 11; i++)
        chk(dut.g_mem[0].u_mem.mem[16'h106 + i][15:0] == 16'hB000 + 16'(i), $sformatf("long message word %0d", i));
    end
    // ------------------------------------------------ Restart message
    repeat (5) @(posedge clk);
    #1 chk(dut.g_mem[0].u_mem.normal == 1'b1, "memory in normal mode before restart");
    inject = 1;
    inject_msg('{4'h0, 4'hB, 4'h8, 4'hB, 4'h1});
    #1;
    chk(n_restart == 1, "restart issued");
    chk(dut.g_mem[0].u_mem.normal == 1'b0 && cpu_ipl == 3'd0, "node reset: memory self-refresh, interrupts clear");
    repeat (40) @(posedge clk);
    #1;
    // ------------------------------------------------ mechanism counts
    $display("uint=%0d reject=%0d ignore=%0d rxdone=%0d dtack=%0d berr=%0d rom=%0d dma=%0d restart=%0d irq=%0d stop=%0d rxstop=%0d romwait=%0d br=%0d iack=%0d",
             n_uint, n_reject, n_ignore, n_rxdone, n_dtack, n_berr, n_rom, n_dma, n_restart, n_irq, n_stop, n_rxstop, n_romwait, n_br, n_iack);
    chk(n_stop > 0, "flow control stop held the transmitter");
    chk(n_rxstop > 0, "receiver asked the sender to stop");
    chk(n_romwait > 0, "microprogram waited on the ROM");
    chk(n_br > 0, "MC68000 held off while SARs were written");
    chk(n_uint > 0, "microinterrupts");
    chk(n_reject > 0, "switch rejection and retransmission");
    chk(n_ignore > 0, "ignore nibbles while data not loaded");
    chk(n_rxdone > 0, "message assembled");
    chk(n_dtack > 0, "MC68000 access acknowledged");
    chk(n_berr > 0, "protection violation");
    chk(n_rom > 0, "ROM word read");
    chk(n_dma > 0, "BIOLINK transfer");
    chk(n_restart > 0, "restart");
    chk(n_irq > 0, "MC68000 interrupt");
    chk(n_iack == 1, "interrupt acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
