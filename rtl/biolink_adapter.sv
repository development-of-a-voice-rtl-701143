// biolink_adapter: Processor Node adapter to the BIOLINK I/O bus.
//
// The BIOLINK is a synchronous bus to up to four I/O modules.  As in the
// document, the adapter is a pair of back-to-back 16-bit latches between the
// PNC Data bus and the BIOLINK Address/Data bus (an output latch the PNC
// loads, an input latch that captures the BIOLINK), plus a small finite state
// machine for the parts of the protocol the PNC cannot do by polling: bus
// capture, round-robin arbitration of the I/O controllers that request local
// memory, the microinterrupt request that calls the PNC, synchronization of
// data acknowledges, and enabling the output latch onto the Address/Data bus.
// For device-register accesses and interrupt-vector capture the PNC drives
// the BIOLINK control lines itself (`pnc_lines`).
//
// Memory-access protocol (this design's own; the document does not give the
// BIOLINK signal list):
//   1. Controllers raise `dma_req[i]`.  When the bus is free and the PNC is
//      not driving the control lines, the FSM grants one controller
//      (round-robin from the one after the last granted) with `grant`.
//   2. The granted controller drives the Address/Data bus and pulses
//      `io_strobe`; the input latch captures it and `dma_uint` asks the PNC
//      for service.
//   3. The PNC reads the latch, and writes the control register: bit 4
//      `next` waits for another word from the same controller (step 2);
//      bit 5 `done` pulses `ack` to the controller, enabling the output
//      latch onto the bus during the acknowledge when bit 6 is set, and
//      frees the bus.  Bits 3:0 are the PNC-driven control lines.
//   A device acknowledge (`dev_ack`) during a PNC register access is
//   registered into `ack_uint` until the PNC writes the control register.
//
// Timing: `grant` appears one clock after a request is seen with the bus
// free; the input latch captures on the clock edge where `io_strobe` is high.
module biolink_adapter #(
  parameter int unsigned N_IO = 4
) (
  input  logic            clk,
  input  logic            rst,
  // PNC side
  input  logic [15:0]     dbus,
  input  logic            out_we,     // load the output latch
  input  logic            ctl_we,     // write the control register
  output logic [15:0]     in_q,       // input latch to the Data bus
  output logic            dma_uint,   // controller word captured, PNC needed
  output logic            ack_uint,   // device acknowledge seen
  output logic [$clog2(N_IO)-1:0] granted,
  // BIOLINK side
  output logic [15:0]     ad_out,
  output logic            ad_oe,
  input  logic [15:0]     ad_in,
  input  logic [N_IO-1:0] dma_req,
  input  logic            io_strobe,
  input  logic            dev_ack,
  output logic [N_IO-1:0] grant,
  output logic            ack,
  output logic [3:0]      pnc_lines
);
  typedef enum logic [1:0] {B_IDLE, B_GRANT, B_PNC, B_ACK} bstate_e;
  bstate_e st;
  logic [15:0] out_latch;
  logic [$clog2(N_IO)-1:0] last, pick;
  logic        found;
  logic        ack_oe;

  // round-robin pick: first requester after `last`
  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int k = 1; k <= N_IO; k++) begin
      automatic int unsigned j = (int'(last) + k) % N_IO;
      if (!found && dma_req[j]) begin
        found = 1'b1;
        pick  = j[$clog2(N_IO)-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= B_IDLE;
      last      <= '1;
      granted   <= '0;
      grant     <= '0;
      ack       <= 1'b0;
      ack_oe    <= 1'b0;
      in_q      <= '0;
      out_latch <= '0;
      pnc_lines <= '0;
      dma_uint  <= 1'b0;
      ack_uint  <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (out_we) out_latch <= dbus;
      if (dev_ack) ack_uint <= 1'b1;
      if (ctl_we) begin
        pnc_lines <= dbus[3:0];
        ack_uint  <= 1'b0;
      end
      unique case (st)
        B_IDLE: begin
          ack_oe <= 1'b0;
          if (found && pnc_lines == '0 && !(ctl_we && dbus[3:0] != '0)) begin
            grant       <= '0;
            grant[pick] <= 1'b1;
            granted     <= pick;
            last        <= pick;
            st          <= B_GRANT;
          end
        end
        B_GRANT: if (io_strobe) begin
          in_q     <= ad_in;
          dma_uint <= 1'b1;
          st       <= B_PNC;
        end
        B_PNC: if (ctl_we) begin
          if (dbus[5]) begin
            dma_uint <= 1'b0;
            ack      <= 1'b1;
            ack_oe   <= dbus[6];
            st       <= B_ACK;
          end else if (dbus[4]) begin
            dma_uint <= 1'b0;
            st       <= B_GRANT;
          end
        end
        B_ACK: begin
          grant  <= '0;
          ack_oe <= 1'b0;
          st     <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end

  assign ad_out = out_latch;
  assign ad_oe  = ack_oe || (pnc_lines[0] && st == B_IDLE);
endmodule
