// vme_jtag: VME-to-JTAG master for one JTAG chain of the DDU board.
//
// A VME-JTAG access (address type 000) names the chain in ADR[15:12], the
// bit count in ADR[11:8] (bits to shift minus one, so 1..16) and the
// command in ADR[5:2]:
//   0..3  shift data, 4'b00TH: H = header, T = tailer
//   5     read the TDO register
//   6     reset the JTAG state machine
//   7     shift the instruction register with header and tailer
//   C..F  shift the instruction register, 4'b11TH as above
//   4, 8..B  no operation (acknowledged)
// Header: TMS 1,0,0 (data) or 1,1,0,0 (instruction) moves the TAP from
// Run-Test/Idle to Shift-DR / Shift-IR. Data: TDI bits come from INDATA,
// least significant bit first; TMS is 0, or 1 on the last bit when a tailer
// follows. Tailer: TMS 1,0 (Update, back to Idle). Without header or tailer
// a long register can be shifted in 16-bit pieces while the TAP stays in
// the shift state. Each TDO bit is shifted into a 16-bit register from the
// top (right shift), so after n bits the first captured bit sits in bit
// 16-n; command 5 returns this register. Reset drives TMS from a six-flop
// ring preset to 1,1,1,1,1,0 for twelve TCK cycles (Test-Logic-Reset, then
// Idle, twice).
//
// Timing: a bit takes two `ce` ticks (TCK low, then TCK high); TDO is
// sampled on the tick that raises TCK, TMS/TDI change on the tick that
// lowers it. DTACK rises when the sequence is finished and stays high until
// the strobe falls. `load` pulses when a shift starts; `done_data` and
// `done_tail` pulse at the end of the data and tailer segments.
// The command set, sequences and the TMS rings follow the board's
// schematics; the state machine form and the single clock with enable are
// this design's choice.
module vme_jtag
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,          // bit-phase tick (2 per TCK period)
  input  logic        sel,         // DEVICE[n]: this chain is addressed
  input  logic        strobe,      // VME-JTAG data phase
  input  logic [9:0]  command,     // ADR[11:2]
  input  logic [15:0] indata,
  input  logic        tdo,
  output logic        tdi,
  output logic        tms,
  output logic        tck,
  output logic        dvcenb,      // this engine owns its chain
  output logic        dtack,
  output logic        outdata_en,  // outdata holds read data
  output logic [15:0] outdata,
  output logic        load,
  output logic        done_data,
  output logic        done_tail
);

  typedef enum logic [2:0] {S_IDLE, S_HEAD, S_DATA, S_TAIL, S_RESET, S_DONE} state_e;
  state_e state;

  logic [3:0]  cnt;       // bits left in the current segment
  logic [3:0]  hpat;      // header TMS pattern, current bit in [3]
  logic [5:0]  ring;      // reset TMS ring, current bit in [5]
  logic [15:0] sr;        // TDI shift register
  logic [15:0] tdo_reg;   // TDO capture register
  logic [4:0]  nbits;
  logic        tail;
  logic        strobe_q;

  wire [3:0] cmd   = command[3:0];
  wire       start = sel && strobe && !strobe_q && state == S_IDLE;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      hpat       <= '0;
      ring       <= '0;
      sr         <= '0;
      tdo_reg    <= '0;
      nbits      <= '0;
      tail       <= 1'b0;
      strobe_q   <= 1'b0;
      tdi        <= 1'b0;
      tms        <= 1'b0;
      tck        <= 1'b0;
      outdata    <= '0;
      outdata_en <= 1'b0;
      load       <= 1'b0;
      done_data  <= 1'b0;
      done_tail  <= 1'b0;
    end else begin
      strobe_q  <= strobe;
      load      <= 1'b0;
      done_data <= 1'b0;
      done_tail <= 1'b0;
      if (start) begin
        tck <= 1'b0;
        if (cmd == JCMD_READ_TDO) begin
          outdata    <= tdo_reg;
          outdata_en <= 1'b1;
          state      <= S_DONE;
        end else if (cmd == JCMD_RESET) begin
          ring  <= 6'b111110;
          tms   <= 1'b1;
          cnt   <= 4'd11;            // 12 bits
          state <= S_RESET;
        end else if (cmd == 4'h4 || cmd[3:2] == 2'b10) begin
          state <= S_DONE;
        end else begin : shift_start
          logic ir, head;
          logic [4:0] n;
          ir   = cmd[3] || cmd == JCMD_IR_HT;
          head = cmd[0] || cmd == JCMD_IR_HT;
          n    = {1'b0, command[9:6]} + 5'd1;
          tail  <= cmd[1] || cmd == JCMD_IR_HT;
          nbits <= n;
          sr    <= indata;
          load  <= 1'b1;
          if (head) begin
            hpat  <= ir ? 4'b1100 : 4'b1000;
            cnt   <= ir ? 4'd3 : 4'd2;
            tms   <= 1'b1;
            state <= S_HEAD;
          end else begin
            cnt   <= command[9:6];
            tdi   <= indata[0];
            tms   <= (n == 5'd1) && (cmd[1] || cmd == JCMD_IR_HT);
            state <= S_DATA;
          end
        end
      end else if (ce && state inside {S_HEAD, S_DATA, S_TAIL, S_RESET}) begin
        if (!tck) begin
          tck <= 1'b1;
          if (state == S_DATA) tdo_reg <= {tdo, tdo_reg[15:1]};
        end else begin
          tck <= 1'b0;
          unique case (state)
            S_HEAD: begin
              if (cnt == '0) begin
                cnt   <= 4'(nbits - 5'd1);
                tdi   <= sr[0];
                tms   <= (nbits == 5'd1) && tail;
                state <= S_DATA;
              end else begin
                hpat <= {hpat[2:0], 1'b0};
                tms  <= hpat[2];
                cnt  <= cnt - 1'b1;
              end
            end
            S_DATA: begin
              sr <= {1'b0, sr[15:1]};
              if (cnt == '0) begin
                done_data <= 1'b1;
                if (tail) begin
                  cnt   <= 4'd1;
                  tms   <= 1'b1;
                  state <= S_TAIL;
                end else begin
                  state <= S_DONE;
                end
              end else begin
                tdi <= sr[1];
                tms <= (cnt == 4'd1) && tail;
                cnt <= cnt - 1'b1;
              end
            end
            S_TAIL: begin
              if (cnt == '0) begin
                done_tail <= 1'b1;
                state     <= S_DONE;
              end else begin
                tms <= 1'b0;
                cnt <= cnt - 1'b1;
              end
            end
            S_RESET: begin
              ring <= {ring[4:0], ring[5]};
              if (cnt == '0) begin
                state <= S_DONE;
              end else begin
                tms <= ring[4];
                cnt <= cnt - 1'b1;
              end
            end
            default: ;
          endcase
        end
      end else if (state == S_DONE && !strobe) begin
        state      <= S_IDLE;
        outdata_en <= 1'b0;
      end
    end
  end

  assign dtack  = (state == S_DONE) && strobe;
  assign dvcenb = (state != S_IDLE);

endmodule
