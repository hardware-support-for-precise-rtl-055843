// i2c_master: I2C controller through which the device reads service
// information from its optical transceivers and programs the frequency
// synthesizer on the daughter card. It performs single-register accesses:
//   write: START, dev+W, reg, data, STOP
//   read : START, dev+W, reg, repeated START, dev+R, data (NACK), STOP
// A command is accepted when cmd_valid and cmd_ready are both high; done
// pulses when the STOP condition has been sent, with rdata (reads) and
// ack_err (a slave did not acknowledge; the transfer then ends with STOP).
// Each bit takes four phases of QDIV clocks: data change while SCL is low,
// SCL high, sample at the middle of SCL high, SCL low. scl_o/sda_o are
// open-drain enables: 0 pulls the line low, 1 releases it. Clock
// stretching is not supported. That the device has an I2C block, and what
// it serves, follows the device description; the access format, the timing
// and the interface are this design's choices.
`timescale 1ns/1ps
module i2c_master #(
  parameter int unsigned QDIV = 312   // clocks per quarter bit: 125 MHz / 400 kHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic       cmd_read,      // 1: read, 0: write
  input  logic [6:0] cmd_dev,
  input  logic [7:0] cmd_reg,
  input  logic [7:0] cmd_wdata,
  output logic       done,
  output logic       ack_err,
  output logic [7:0] rdata,
  output logic       scl_o,
  output logic       sda_o,
  input  logic       sda_i
);
  typedef enum logic [2:0] {OP_IDLE, OP_START, OP_RSTART, OP_WBYTE, OP_RBYTE, OP_STOP} op_e;

  op_e         op;
  logic [2:0]  step;     // position in the access sequence
  logic [1:0]  ph;       // phase within a bit
  logic [3:0]  bitn;     // 0..7 data bits, 8 acknowledge
  logic [7:0]  sh;       // byte being sent or received
  logic [$clog2(QDIV)-1:0] div;
  logic        tick;
  logic        rd_q, nack;
  logic [6:0]  dev_q;
  logic [7:0]  reg_q, wd_q;

  assign tick      = (32'(div) == QDIV - 1);
  assign cmd_ready = (op == OP_IDLE);

  // what comes at a given step of the sequence
  function automatic op_e op_at(input logic [2:0] s, input logic rd);
    unique case (s)
      3'd0:    op_at = OP_START;
      3'd1:    op_at = OP_WBYTE;
      3'd2:    op_at = OP_WBYTE;
      3'd3:    op_at = rd ? OP_RSTART : OP_WBYTE;
      3'd4:    op_at = rd ? OP_WBYTE  : OP_STOP;
      3'd5:    op_at = rd ? OP_RBYTE  : OP_IDLE;
      3'd6:    op_at = rd ? OP_STOP   : OP_IDLE;
      default: op_at = OP_IDLE;
    endcase
  endfunction

  function automatic logic [7:0] byte_at(input logic [2:0] s);
    unique case (s)
      3'd1:    byte_at = {dev_q, 1'b0};
      3'd2:    byte_at = reg_q;
      3'd3:    byte_at = wd_q;
      3'd4:    byte_at = {dev_q, 1'b1};
      default: byte_at = 8'hFF;
    endcase
  endfunction

  // line levels for the current phase
  logic scl_n, sda_n;
  always_comb begin
    scl_n = 1'b1;
    sda_n = 1'b1;
    unique case (op)
      OP_START:  begin scl_n = (ph < 2'd2);               sda_n = (ph == 2'd0); end
      OP_RSTART: begin scl_n = (ph == 2'd1 || ph == 2'd2); sda_n = (ph < 2'd2);  end
      OP_STOP:   begin scl_n = (ph != 2'd0);              sda_n = (ph >= 2'd2); end
      OP_WBYTE:  begin scl_n = (ph == 2'd1 || ph == 2'd2); sda_n = (bitn == 4'd8) ? 1'b1 : sh[7]; end
      OP_RBYTE:  begin scl_n = (ph == 2'd1 || ph == 2'd2); sda_n = 1'b1; end
      default:   ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= OP_IDLE; step <= '0; ph <= '0; bitn <= '0; sh <= '0; div <= '0;
      rd_q <= 1'b0; nack <= 1'b0; dev_q <= '0; reg_q <= '0; wd_q <= '0;
      done <= 1'b0; ack_err <= 1'b0; rdata <= '0;
      scl_o <= 1'b1; sda_o <= 1'b1;
    end else begin
      done <= 1'b0;
      if (op == OP_IDLE) begin
        div <= '0; ph <= '0;
        scl_o <= 1'b1; sda_o <= 1'b1;
        if (cmd_valid) begin
          rd_q <= cmd_read; dev_q <= cmd_dev; reg_q <= cmd_reg; wd_q <= cmd_wdata;
          nack <= 1'b0; step <= '0; op <= OP_START;
        end
      end else begin
        scl_o <= scl_n;
        sda_o <= sda_n;
        div   <= tick ? '0 : div + 1'b1;
        if (tick) begin
          ph <= ph + 2'd1;
          if (ph == 2'd2 && (op == OP_WBYTE || op == OP_RBYTE)) begin
            if (bitn == 4'd8) begin
              if (op == OP_WBYTE && sda_i) nack <= 1'b1;
            end else if (op == OP_RBYTE) sh <= {sh[6:0], sda_i};
          end
          if (ph == 2'd3) begin
            if ((op == OP_WBYTE || op == OP_RBYTE) && bitn != 4'd8) begin
              bitn <= bitn + 4'd1;
              if (op == OP_WBYTE) sh <= {sh[6:0], 1'b1};
            end else if (op == OP_STOP) begin
              op      <= OP_IDLE;
              done    <= 1'b1;
              ack_err <= nack;
            end else begin
              // next element of the sequence; after a NACK go to STOP
              op_e nx;
              nx = op_at(step + 3'd1, rd_q);
              if (nack) nx = OP_STOP;
              if (op == OP_RBYTE) rdata <= sh;
              op   <= nx;
              step <= step + 3'd1;
              bitn <= '0;
              sh   <= byte_at(step + 3'd1);
            end
          end
        end
      end
    end
  end

endmodule
