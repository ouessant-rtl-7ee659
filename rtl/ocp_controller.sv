// ocp_controller -- instruction fetch, decode and execution unit.
//
// An un-pipelined fetch/decode/execute microcontroller: one finite state
// machine and a few registers (program counter, instruction register, burst
// offset and word counter). The microcode lives in system memory, in bank 0
// from offset 0; the CPU gives its length in the program-size register and
// starts the controller with the S bit.
//
// Instructions (see ocp_pkg for the encoding):
//   mvtc  bank,offset,2**blen,fifo  read 2**blen words from memory starting
//                                   at (bank, offset) and push them into
//                                   input FIFO 'fifo'
//   mvfc  bank,offset,2**blen,fifo  pop 2**blen words from output FIFO 'fifo'
//                                   and write them to memory at (bank, offset)
//   execs                           pulse start_op and wait for end_op
//   eop                             end of program: pulse done (sets D in the
//                                   control register, which may interrupt)
// Reaching the program size without eop ends the program the same way. An
// unknown opcode, or a FIFO number with no FIFO behind it, is skipped.
//
// Memory interface: read or write is offered with bank, offset and
// data_out until addr_ok (address accepted); the access completes later
// with data_ok, the read word then on data_in. During a transfer the next
// word is offered as soon as the previous address is accepted, so at most
// one access is waiting for its data while the next one is offered, and a
// transfer streams at one word per cycle on a free bus.
//
// Flow control: for mvtc a read is only offered when the input FIFO can
// take every word in flight plus the new one (not full with nothing in
// flight, not almost full with one word in flight); for mvfc a write is
// only offered while the output FIFO has a word, and that word is popped
// when the address is accepted (the bus master keeps it for the data
// phase). The controller thus stalls on a full or empty FIFO. burst is
// raised on every access of a transfer but the last.
//
// Timing on a free bus: a transfer of N words takes N+1 cycles in its
// execute state; each instruction adds a fetch (two cycles) and two cycles
// of decode and sequencing.
//
// The instruction set (four instructions, 5-bit opcode), the fetch/decode/
// execute organisation and the FIFO-based accelerator interface follow the
// published design; the encoding, program location in bank 0, stall rules
// and the handling of bad instructions are this design's choices.
module ocp_controller
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_IN  = 1,   // input FIFOs (memory -> accelerator)
  parameter int unsigned NUM_OUT = 1    // output FIFOs (accelerator -> memory)
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                start,
  output logic                done,
  input  logic [DATA_W-1:0]   prog_size,
  output logic                busy,
  // memory access, through the interface
  output logic [BANK_W-1:0]   bank,
  output logic [OFFSET_W-1:0] offset,
  output logic                read,
  output logic                write,
  output logic                burst,
  input  logic                addr_ok,
  input  logic                data_ok,
  input  logic [DATA_W-1:0]   data_in,
  output logic [DATA_W-1:0]   data_out,
  // input FIFOs
  output logic [NUM_IN-1:0]   in_wr_en,
  output logic [DATA_W-1:0]   in_din,
  input  logic [NUM_IN-1:0]   in_full,
  input  logic [NUM_IN-1:0]   in_afull,
  // output FIFOs
  output logic [NUM_OUT-1:0]  out_rd_en,
  input  logic [DATA_W-1:0]   out_dout [NUM_OUT],
  input  logic [NUM_OUT-1:0]  out_empty,
  // accelerator
  output logic                start_op,
  input  logic                end_op
);
  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_DECODE, S_MVTC, S_MVFC, S_EXEC_WAIT, S_NEXT, S_FINISH
  } state_e;

  localparam int unsigned CNT_W = (1 << BLEN_W);  // holds 2**(2**BLEN_W-1)

  state_e              state;
  logic [DATA_W-1:0]   pc;
  instr_t              ir;
  logic [OFFSET_W-1:0] xfer_off;   // offset of the next word to request
  logic [CNT_W-1:0]    issue_cnt;  // words not yet requested
  logic [CNT_W-1:0]    ack_cnt;    // words not yet completed
  logic                fetch_sent; // instruction fetch accepted, data awaited

  wire opcode_e op       = opcode_e'(ir.opcode);
  wire          in_ok    = (32'(ir.fifo) < NUM_IN);
  wire          out_ok   = (32'(ir.fifo) < NUM_OUT);
  logic         in_room;   // selected input FIFO can take a word
  logic         out_data;  // selected output FIFO has a word
  wire          in_flight = (issue_cnt != ack_cnt);   // one word awaits its data
  wire          to_issue  = (issue_cnt != '0);
  wire          last_ack  = (ack_cnt == CNT_W'(1));
  wire          more      = (issue_cnt > CNT_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pc       <= '0;
      ir       <= '0;
      xfer_off   <= '0;
      issue_cnt  <= '0;
      ack_cnt    <= '0;
      fetch_sent <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pc    <= '0;
          state <= (prog_size == '0) ? S_FINISH : S_FETCH;
        end
        S_FETCH: begin
          if (addr_ok) fetch_sent <= 1'b1;
          if (data_ok) begin
            fetch_sent <= 1'b0;
            ir         <= instr_t'(data_in);
            pc         <= pc + 1'b1;
            state      <= S_DECODE;
          end
        end
        S_DECODE: begin
          xfer_off  <= ir.offset;
          issue_cnt <= CNT_W'(1) << ir.blen;
          ack_cnt   <= CNT_W'(1) << ir.blen;
          unique case (op)
            OP_MVTC:  state <= in_ok  ? S_MVTC : S_NEXT;
            OP_MVFC:  state <= out_ok ? S_MVFC : S_NEXT;
            OP_EXECS: state <= S_EXEC_WAIT;
            OP_EOP:   state <= S_FINISH;
            default:  state <= S_NEXT;
          endcase
        end
        S_MVTC, S_MVFC: begin
          if (addr_ok) begin
            xfer_off  <= xfer_off + 1'b1;
            issue_cnt <= issue_cnt - 1'b1;
          end
          if (data_ok) begin
            ack_cnt <= ack_cnt - 1'b1;
            if (last_ack) state <= S_NEXT;
          end
        end
        S_EXEC_WAIT: if (end_op) state <= S_NEXT;
        S_NEXT:   state <= (pc >= prog_size) ? S_FINISH : S_FETCH;
        S_FINISH: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    in_room  = 1'b0;
    out_data = 1'b0;
    for (int i = 0; i < NUM_IN; i++)
      if (32'(ir.fifo) == i) in_room = in_flight ? !in_afull[i] : !in_full[i];
    for (int i = 0; i < NUM_OUT; i++) if (32'(ir.fifo) == i) out_data = !out_empty[i];
  end

  always_comb begin
    bank      = '0;
    offset    = '0;
    read      = 1'b0;
    write     = 1'b0;
    burst     = 1'b0;
    data_out  = '0;
    in_wr_en  = '0;
    in_din    = data_in;
    out_rd_en = '0;
    unique case (state)
      S_FETCH: begin
        offset = pc[OFFSET_W-1:0];
        read   = !fetch_sent;
      end
      S_MVTC: begin
        bank   = ir.bank;
        offset = xfer_off;
        read   = to_issue && in_room;
        burst  = read && more;
        for (int i = 0; i < NUM_IN; i++)
          in_wr_en[i] = data_ok && (32'(ir.fifo) == i);
      end
      S_MVFC: begin
        bank   = ir.bank;
        offset = xfer_off;
        write  = to_issue && out_data;
        burst  = write && more;
        for (int i = 0; i < NUM_OUT; i++) begin
          if (32'(ir.fifo) == i) data_out = out_dout[i];
          out_rd_en[i] = addr_ok && (32'(ir.fifo) == i);
        end
      end
      default: ;
    endcase
  end

  assign start_op = (state == S_DECODE) && (op == OP_EXECS);
  assign done     = (state == S_FINISH);
  assign busy     = (state != S_IDLE);
endmodule
