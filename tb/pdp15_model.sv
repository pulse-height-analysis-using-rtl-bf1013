// pdp15_model: behavioural model of the PDP-15 side of the I/O bus, for testbenches.
//
// Holds an 8192-word, 18-bit memory and serves two kinds of bus traffic, one
// at a time, on the rising edge of `clk`:
//   * programmed transfers: the task iot(dev, pulses, ac, skip) puts the
//     device/subdevice digits on dev_sel and the accumulator on iob, issues
//     IOP1, IOP2, IOP4 (those selected by `pulses` bits 0,1,2) one cycle each,
//     and returns whether the device asked for a skip during IOP1;
//   * data channel cycles: when dch_rq is high it gives a one-cycle dch_gr,
//     samples the address and INC MB one cycle later, waits MEM_CYCLES and then
//     either adds one to the word (io_oflo with dch_done if it wraps past
//     262143) or puts the word on iob with dch_done.
// Pending IOTs go before data channel requests. Counters of increment and read
// cycles and of overflows are kept for the testbenches.
`timescale 1ns/1ps
module pdp15_model
  import pha_pkg::*;
#(
  parameter int unsigned MEM_CYCLES = 10
) (
  input  logic        clk,
  input  logic        rst,         // bus held idle
  output logic [8:0]  dev_sel,
  output logic        iop1,
  output logic        iop2,
  output logic        iop4,
  output word_t       iob,
  input  logic        skip_rq,
  output logic        dch_gr,
  output logic        dch_done,
  output logic        io_oflo,
  input  logic        dch_rq,
  input  addr_t       dch_addr,
  input  logic        inc_mb
);
  typedef enum logic [3:0] {
    P_IDLE, P_IOT1, P_IOT2, P_IOT4, P_GR, P_ADDR, P_MEM, P_DONE
  } pstate_t;

  word_t   mem [8192];
  pstate_t st;
  int      req_seq, ack_seq;
  logic [8:0] req_dev;
  logic [2:0] req_iop;
  word_t   req_ac, rd_data;
  logic    skip_cap, cyc_inc;
  addr_t   cyc_addr;
  int      wait_cnt;
  int      n_inc, n_read, n_oflo, n_iot;
  logic    in_iot;

  initial begin
    foreach (mem[i]) mem[i] = '0;
    st = P_IDLE; req_seq = 0; ack_seq = 0;
    dev_sel = '0; iop1 = 0; iop2 = 0; iop4 = 0; dch_gr = 0; dch_done = 0; io_oflo = 0;
    rd_data = '0; req_ac = '0; req_dev = '0; req_iop = '0; in_iot = 0; skip_cap = 0;
    n_inc = 0; n_read = 0; n_oflo = 0; n_iot = 0; wait_cnt = 0; cyc_inc = 0; cyc_addr = '0;
  end

  assign iob = in_iot ? req_ac : rd_data;

  task automatic iot(input logic [8:0] dev, input logic [2:0] pulses, input word_t ac,
                     output logic skip);
    req_dev = dev; req_iop = pulses; req_ac = ac;
    req_seq = req_seq + 1;
    wait (ack_seq == req_seq);
    skip = skip_cap;
  endtask

  always @(posedge clk) begin
    dch_gr   <= 1'b0;
    dch_done <= 1'b0;
    io_oflo  <= 1'b0;
    iop1 <= 1'b0; iop2 <= 1'b0; iop4 <= 1'b0;
    if (rst) st <= P_IDLE;
    else case (st)
      P_IDLE:
        if (req_seq != ack_seq) begin
          in_iot  <= 1'b1;
          dev_sel <= req_dev;
          iop1    <= req_iop[0];
          skip_cap <= 1'b0;
          st      <= P_IOT1;
        end else if (dch_rq) begin
          dch_gr <= 1'b1;
          st     <= P_GR;
        end
      P_IOT1: begin skip_cap <= skip_rq; iop2 <= req_iop[1]; st <= P_IOT2; end
      P_IOT2: begin iop4 <= req_iop[2]; st <= P_IOT4; end
      P_IOT4: begin
        in_iot  <= 1'b0;
        dev_sel <= '0;
        n_iot   <= n_iot + 1;
        ack_seq <= req_seq;
        st      <= P_IDLE;
      end
      P_GR:   st <= P_ADDR;
      P_ADDR: begin cyc_addr <= dch_addr; cyc_inc <= inc_mb; wait_cnt <= MEM_CYCLES; st <= P_MEM; end
      P_MEM:  if (wait_cnt <= 1) st <= P_DONE; else wait_cnt <= wait_cnt - 1;
      P_DONE: begin
        if (cyc_inc) begin
          mem[cyc_addr] <= mem[cyc_addr] + 1'b1;
          io_oflo <= (mem[cyc_addr] == '1);
          if (mem[cyc_addr] == '1) n_oflo <= n_oflo + 1;
          n_inc <= n_inc + 1;
        end else begin
          rd_data <= mem[cyc_addr];
          n_read  <= n_read + 1;
        end
        dch_done <= 1'b1;
        st <= P_IDLE;
      end
      default: st <= P_IDLE;
    endcase
  end
endmodule
