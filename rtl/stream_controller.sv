// stream_controller: takes stream instructions from the host and sequences
// them over the streaming memory system, the SRF and the ALU clusters.
//
// The host writes stream_instr_t words through a valid/ready port into an
// instruction queue of IQ_DEPTH entries (a stream buffer), so it can run ahead
// of the stream processor. The controller executes the queue in order, one
// instruction at a time:
//   LOAD    starts SRF port P_MEM as a write port at srf_a and the memory
//           system as a load from mem_addr, len words; waits for both to finish.
//   STORE   starts P_MEM as a read port at srf_a and the memory system as a
//           store to mem_addr; waits for both.
//   KERNEL  starts the kernel's input port (read, srf_a, len) and output port
//           (write, srf_b, out_len), pulses the kernel's start (with width for
//           the convolution, len/out_len for the external cluster) and waits
//           until both ports are done.
//   SETCOEF writes one convolution coefficient; NOP and zero-length transfers
//           retire at once.
// instr_done pulses as each instruction retires; idle is high when the queue
// is empty and nothing runs. Commands are registered one-cycle pulses issued
// the cycle after the instruction leaves the queue.
// The stream controller sequencing host instructions follows the source
// architecture; the instruction set, the queue and the strictly in-order,
// one-at-a-time execution are this design's choices.
module stream_controller
  import sp_pkg::*;
#(
  parameter int IQ_DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host
  input  logic                     instr_valid,
  input  stream_instr_t            instr,
  output logic                     instr_ready,
  output logic                     instr_done,
  output logic                     idle,
  // SRF stream ports
  output logic                     srf_cmd_valid [N_SRF_PORTS],
  output srf_cmd_t                 srf_cmd       [N_SRF_PORTS],
  input  logic                     srf_done      [N_SRF_PORTS],
  // streaming memory system
  output logic                     mem_cmd_valid,
  output logic                     mem_cmd_store,
  output logic [MEM_AW-1:0]        mem_cmd_addr,
  output logic [LEN_W-1:0]         mem_cmd_len,
  input  logic                     mem_done,
  // convolution cluster
  output logic                     conv_start,
  output logic [LEN_W-1:0]         conv_width,
  output logic                     coef_we,
  output logic [3:0]               coef_idx,
  output logic signed [COEF_W-1:0] coef_val,
  // external programmable cluster (through its microcontroller)
  output logic                     ext_start,
  output logic [LEN_W-1:0]         ext_len,
  output logic [LEN_W-1:0]         ext_out_len
);

  localparam int IW = $bits(stream_instr_t);
  localparam int CW = $clog2(IQ_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT} state_e;
  state_e state;

  logic          q_empty, q_full, q_pop;
  logic [IW-1:0] q_dout;
  logic [CW-1:0] q_count;
  stream_instr_t cur;

  // completion flags still awaited
  logic          wait_a, wait_b;
  logic          done_a, done_b;
  int unsigned   port_a, port_b;   // SRF ports / sources being waited on
  logic          a_is_mem;

  stream_buffer #(.WIDTH(IW), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n, .clr(1'b0),
    .push_n(instr_valid && instr_ready), .din(IW'(instr)),
    .pop_n (q_pop), .dout(q_dout),
    .full (q_full), .empty(q_empty), .count(q_count)
  );

  assign instr_ready = !q_full;
  assign cur         = stream_instr_t'(q_dout);
  assign q_pop       = (state == S_IDLE) && !q_empty;
  assign idle        = (state == S_IDLE) && q_empty;

  assign done_a = a_is_mem ? mem_done : srf_done[port_a];
  assign done_b = srf_done[port_b];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      wait_a        <= 1'b0;
      wait_b        <= 1'b0;
      port_a        <= 0;
      port_b        <= 0;
      a_is_mem      <= 1'b0;
      instr_done    <= 1'b0;
      mem_cmd_valid <= 1'b0;
      mem_cmd_store <= 1'b0;
      mem_cmd_addr  <= '0;
      mem_cmd_len   <= '0;
      conv_start    <= 1'b0;
      conv_width    <= '0;
      coef_we       <= 1'b0;
      coef_idx      <= '0;
      coef_val      <= '0;
      ext_start     <= 1'b0;
      ext_len       <= '0;
      ext_out_len   <= '0;
      for (int p = 0; p < N_SRF_PORTS; p++) begin
        srf_cmd_valid[p] <= 1'b0;
        srf_cmd[p]       <= '0;
      end
    end else begin
      instr_done    <= 1'b0;
      mem_cmd_valid <= 1'b0;
      conv_start    <= 1'b0;
      coef_we       <= 1'b0;
      ext_start     <= 1'b0;
      for (int p = 0; p < N_SRF_PORTS; p++) srf_cmd_valid[p] <= 1'b0;

      case (state)
        S_IDLE: if (!q_empty) begin
          unique case (cur.op)
            SOP_LOAD, SOP_STORE: begin
              if (cur.len == '0) instr_done <= 1'b1;
              else begin
                srf_cmd_valid[P_MEM] <= 1'b1;
                srf_cmd[P_MEM]       <= '{wr: cur.op == SOP_LOAD,
                                          base: cur.srf_a, len: cur.len};
                mem_cmd_valid <= 1'b1;
                mem_cmd_store <= cur.op == SOP_STORE;
                mem_cmd_addr  <= cur.mem_addr;
                mem_cmd_len   <= cur.len;
                a_is_mem <= 1'b1;
                port_b   <= P_MEM;
                wait_a   <= 1'b1;
                wait_b   <= 1'b1;
                state    <= S_WAIT;
              end
            end
            SOP_KERNEL: begin
              int unsigned pin, pout;
              unique case (cur.kernel)
                K_RGB2YUV: begin pin = P_YUV_IN;  pout = P_YUV_OUT;  end
                K_CONV3X3: begin pin = P_CONV_IN; pout = P_CONV_OUT; end
                default:   begin pin = P_EXT_IN;  pout = P_EXT_OUT;  end
              endcase
              if (cur.len == '0 || cur.out_len == '0 || cur.kernel == kid_e'(2'd3))
                instr_done <= 1'b1;
              else begin
                srf_cmd_valid[pin]  <= 1'b1;
                srf_cmd[pin]        <= '{wr: 1'b0, base: cur.srf_a, len: cur.len};
                srf_cmd_valid[pout] <= 1'b1;
                srf_cmd[pout]       <= '{wr: 1'b1, base: cur.srf_b, len: cur.out_len};
                conv_start  <= cur.kernel == K_CONV3X3;
                conv_width  <= cur.width;
                ext_start   <= cur.kernel == K_EXT;
                ext_len     <= cur.len;
                ext_out_len <= cur.out_len;
                a_is_mem <= 1'b0;
                port_a   <= pin;
                port_b   <= pout;
                wait_a   <= 1'b1;
                wait_b   <= 1'b1;
                state    <= S_WAIT;
              end
            end
            SOP_SETCOEF: begin
              coef_we    <= 1'b1;
              coef_idx   <= cur.coef_idx;
              coef_val   <= cur.coef;
              instr_done <= 1'b1;
            end
            default: instr_done <= 1'b1;
          endcase
        end
        S_WAIT: begin
          if (done_a) wait_a <= 1'b0;
          if (done_b) wait_b <= 1'b0;
          if ((!wait_a || done_a) && (!wait_b || done_b)) begin
            state      <= S_IDLE;
            instr_done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
