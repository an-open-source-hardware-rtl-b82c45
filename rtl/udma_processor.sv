// udma_processor: executes one UDMA instruction at a time as a Wishbone master.
//
// An instruction UDMA <src_addr> <dst_addr> <src_inc> <dst_inc> <N> copies N 32-bit words: word k
// is read from src_addr + k*src_inc and written to dst_addr + k*dst_inc. An increment of 0 keeps
// hitting one address, which is how a FIFO is read or filled. The instruction fields and the
// commands arrive from the ComBlock registers written by the processor firmware; status and the
// number of words moved go back through the ComBlock input registers.
//
// Commands (cmd_valid for one cycle with cmd):
//   START  latch `instr` and begin, if idle (ignored while busy). N = 0 completes at once.
//   STOP   abandon the transfer in progress; status.stopped is set. The engine drops the
//          strobe and spends one cycle (S_DRAIN, still busy) waiting for the answer to the access
//          that was on the bus when STOP came: a slave that registers its ack may have carried it
//          out on that very edge. A write answered then is counted, so count always equals the
//          words written. A word whose read completes that way is dropped (a FIFO source has
//          already given it up).
//   RESET  abandon any transfer and clear status and count.
//
// Transfer engine (this design's choice; only the function is specified): one word at a time,
// a classic Wishbone read of the source followed by a classic write of the destination, with
// cyc held for the whole transfer. With slaves that answer one cycle after the strobe, as all of
// this design's slaves do, a word takes 4 cycles and N words take 4*N cycles from the START
// cycle to status.done. A slave may stall (hold ack low), e.g. an empty FIFO; the engine waits,
// and STOP gets it out. A bus error ends the transfer with status.error.
// The master always spends at least one cycle with cyc low between transfers (S_DRAIN after a
// STOP), so a registered ack belonging to an abandoned access cannot be taken for the next one.
module udma_processor
  import udma_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // instruction and command, from the ComBlock output registers
  input  udma_instr_t  instr,
  input  logic         cmd_valid,
  input  udma_cmd_e    cmd,
  // status, to the ComBlock input registers
  output udma_status_t status,
  output logic [31:0]  count,
  // Wishbone master
  output wb_req_t      wbm_req,
  input  wb_rsp_t      wbm_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_DRAIN} state_e;

  state_e        state;
  logic [AW-1:0] src_q, dst_q, src_inc_q, dst_inc_q;
  logic [31:0]   n_q;
  logic [DW-1:0] buf_q;
  logic          done_q, stopped_q, error_q;
  logic          drain_we_q;  // the access abandoned by STOP was a write

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      src_q     <= '0;
      dst_q     <= '0;
      src_inc_q <= '0;
      dst_inc_q <= '0;
      n_q       <= '0;
      buf_q     <= '0;
      count     <= '0;
      done_q    <= 1'b0;
      stopped_q <= 1'b0;
      error_q   <= 1'b0;
      drain_we_q <= 1'b0;
    end else if (cmd_valid && cmd == CMD_RESET) begin
      state     <= S_IDLE;
      count     <= '0;
      done_q    <= 1'b0;
      stopped_q <= 1'b0;
      error_q   <= 1'b0;
    end else if (cmd_valid && cmd == CMD_STOP && (state == S_READ || state == S_WRITE)) begin
      stopped_q <= 1'b1;
      if (wbm_rsp.ack || wbm_rsp.err) begin
        // the access completed in the STOP cycle: a write is counted, nothing is left in flight
        if (state == S_WRITE && wbm_rsp.ack) count <= count + 32'd1;
        state <= S_IDLE;
      end else begin
        drain_we_q <= (state == S_WRITE);
        state      <= S_DRAIN;
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          if (cmd_valid && cmd == CMD_START) begin
            src_q     <= instr.src_addr;
            dst_q     <= instr.dst_addr;
            src_inc_q <= instr.src_inc;
            dst_inc_q <= instr.dst_inc;
            n_q       <= instr.n_words;
            count     <= '0;
            stopped_q <= 1'b0;
            error_q   <= 1'b0;
            done_q    <= (instr.n_words == 32'd0);
            state     <= (instr.n_words == 32'd0) ? S_IDLE : S_READ;
          end
        end
        S_READ: begin
          if (wbm_rsp.err) begin
            error_q <= 1'b1;
            state   <= S_IDLE;
          end else if (wbm_rsp.ack) begin
            buf_q <= wbm_rsp.dat;
            state <= S_WRITE;
          end
        end
        S_WRITE: begin
          if (wbm_rsp.err) begin
            error_q <= 1'b1;
            state   <= S_IDLE;
          end else if (wbm_rsp.ack) begin
            count <= count + 32'd1;
            src_q <= src_q + src_inc_q;
            dst_q <= dst_q + dst_inc_q;
            if (count + 32'd1 == n_q) begin
              done_q <= 1'b1;
              state  <= S_IDLE;
            end else begin
              state <= S_READ;
            end
          end
        end
        S_DRAIN: begin
          if (drain_we_q && wbm_rsp.ack) count <= count + 32'd1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    wbm_req     = WB_REQ_IDLE;
    wbm_req.sel = 4'hF;
    unique case (state)
      S_READ: begin
        wbm_req.cyc = 1'b1;
        wbm_req.stb = 1'b1;
        wbm_req.adr = src_q;
      end
      S_WRITE: begin
        wbm_req.cyc = 1'b1;
        wbm_req.stb = 1'b1;
        wbm_req.we  = 1'b1;
        wbm_req.adr = dst_q;
        wbm_req.dat = buf_q;
      end
      S_DRAIN: begin
        // strobe low; the address stays so the interconnect routes the late answer back
        wbm_req.we  = drain_we_q;
        wbm_req.adr = drain_we_q ? dst_q : src_q;
      end
      default: ;
    endcase
  end

  always_comb begin
    status         = '0;
    status.busy    = (state != S_IDLE);
    status.done    = done_q;
    status.stopped = stopped_q;
    status.error   = error_q;
  end

  // Wishbone rules: a strobe only inside a cycle; a slave never answers with ack and err at once.
  assert property (@(posedge clk) disable iff (!rst_n) wbm_req.stb |-> wbm_req.cyc);
  assert property (@(posedge clk) disable iff (!rst_n) !(wbm_rsp.ack && wbm_rsp.err));

endmodule
