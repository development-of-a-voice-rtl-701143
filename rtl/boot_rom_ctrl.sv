// boot_rom_ctrl: word access to the 4K x 8 bootstrap EPROM.
//
// The MC68000 reads 16-bit words, the EPROM is byte wide and slow.  As in the
// document, a word read is two successive byte reads: the even byte (high
// half, MC68000 byte order) then the odd byte.  The document gives the total
// ROM access time as 2 microseconds at the 8 MHz clock (16 cycles); this
// design spends BYTE_WAIT = 8 cycles on each byte.  `start` with `word_addr`
// begins a read; `busy` is high until `word` is valid, and `done` pulses for
// one clock when it is.  The EPROM chip itself is outside this block
// (`rom_addr`, `rom_oe`, `rom_data`).
//
// Timing: `done` is set by the 2*BYTE_WAIT-th clock edge after the edge that
// takes `start` (16 clocks, the document's 2 microseconds at 8 MHz).
module boot_rom_ctrl #(
  parameter int unsigned ROM_BYTES = 4096,
  parameter int unsigned BYTE_WAIT = 8
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  input  logic [$clog2(ROM_BYTES)-2:0] word_addr,
  output logic [$clog2(ROM_BYTES)-1:0] rom_addr,
  output logic                         rom_oe,
  input  logic [7:0]                   rom_data,
  output logic [15:0]                  word,
  output logic                         busy,
  output logic                         done
);
  typedef enum logic [1:0] {R_IDLE, R_HI, R_LO} rstate_e;
  rstate_e st;
  logic [$clog2(BYTE_WAIT+1)-1:0] cnt;
  logic [$clog2(ROM_BYTES)-2:0]   wa;

  assign rom_addr = {wa, (st == R_LO)};
  assign rom_oe   = (st != R_IDLE);
  assign busy     = (st != R_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= R_IDLE;
      cnt  <= '0;
      wa   <= '0;
      word <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        R_IDLE: if (start) begin
          wa  <= word_addr;
          cnt <= '0;
          st  <= R_HI;
        end
        R_HI: begin
          if (32'(cnt) == BYTE_WAIT-1) begin
            word[15:8] <= rom_data;
            cnt <= '0;
            st  <= R_LO;
          end else cnt <= cnt + 1'b1;
        end
        R_LO: begin
          if (32'(cnt) == BYTE_WAIT-1) begin
            word[7:0] <= rom_data;
            done <= 1'b1;
            st   <= R_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
