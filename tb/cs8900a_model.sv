// cs8900a_model: behavioural model of the CS8900A Ethernet controller's
// 8-bit I/O-mode host interface, for testbenches only (not synthesizable).
//
// Modelled: the PacketPage pointer port (0xA/0xB) and data port (0xC/0xD),
// with the product ID (0x630E), RxCTL, LineCTL and RxEvent registers; the
// receive data port (0x0/0x1), which streams RxStatus, RxLength (each low
// byte first) and then the frame bytes of the oldest stored frame. A frame
// given to push_frame is stored only if reception is on (LineCTL SerRxON and
// RxCTL RxOKA set); storing it sets RxEvent's RxOK bit, which reading
// RxEvent clears. Reads and writes take effect when the strobe rises.
// Nothing is checked or changed while rst is high. bus_errors counts
// protocol faults: both strobes low, a strobe with aen
// high, or a receive-port byte read at the wrong byte address.
module cs8900a_model (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] sa,
  input  logic [7:0] din,
  output logic [7:0] dout,
  input  logic       ior_n,
  input  logic       iow_n,
  input  logic       aen
);
  logic [15:0] pp_ptr = '0;
  logic [15:0] rxctl = 16'h0005, linectl = 16'h0013;
  logic        rx_flag = 1'b0;
  logic [7:0]  fifo[$];
  int          lens[$];
  int          rd_pos = 0;
  int          bus_errors = 0, frames_read = 0, frames_dropped = 0, reads = 0;
  logic        prev_ior = 1'b1, prev_iow = 1'b1;

  function automatic logic [15:0] pp_value(input logic [15:0] a);
    case (a)
      16'h0000: return 16'h630E;
      16'h0104: return rxctl;
      16'h0112: return linectl;
      16'h0124: return 16'h0004 | (rx_flag ? 16'h0100 : 16'h0000);
      default:  return 16'h0000;
    endcase
  endfunction

  function automatic logic [7:0] stream_byte(input int pos);
    int len = (lens.size() > 0) ? lens[0] : 0;
    case (pos)
      0: return 8'h04;           // RxStatus low: register number
      1: return 8'h01;           // RxStatus high: RxOK
      2: return 8'(len);
      3: return 8'(len >> 8);
      default: return (pos - 4 < fifo.size()) ? fifo[pos - 4] : 8'h00;
    endcase
  endfunction

  always_comb begin
    case (sa)
      4'h0, 4'h1: dout = stream_byte(rd_pos);
      4'hA:       dout = pp_ptr[7:0];
      4'hB:       dout = pp_ptr[15:8];
      4'hC:       dout = pp_value(pp_ptr)[7:0];
      4'hD:       dout = pp_value(pp_ptr)[15:8];
      default:    dout = 8'h00;
    endcase
  end

  task automatic push_frame(input logic [7:0] f[$]);
    if (linectl[6] && rxctl[8]) begin
      foreach (f[i]) fifo.push_back(f[i]);
      lens.push_back(f.size());
      rx_flag = 1'b1;
    end else begin
      frames_dropped++;
    end
  endtask

  always @(posedge clk) begin
    prev_ior <= ior_n;
    prev_iow <= iow_n;
    if (rst) begin
      prev_ior <= 1'b1;
      prev_iow <= 1'b1;
    end else begin
      if (!ior_n && !iow_n) bus_errors++;
      if ((!ior_n || !iow_n) && aen) bus_errors++;
      // read completes
      if (ior_n && !prev_ior) begin
        reads++;
        if (sa == 4'hD && pp_ptr == 16'h0124) rx_flag = 1'b0;
        if (sa == 4'h0 || sa == 4'h1) begin
          if (sa[0] != rd_pos[0] || lens.size() == 0) bus_errors++;
          rd_pos++;
          if (lens.size() > 0 && rd_pos == 4 + lens[0]) begin
            for (int i = 0; i < lens[0]; i++) void'(fifo.pop_front());
            void'(lens.pop_front());
            rd_pos = 0;
            frames_read++;
            if (lens.size() > 0) rx_flag = 1'b1;
          end
        end
      end
      // write completes
      if (iow_n && !prev_iow) begin
        case (sa)
          4'hA: pp_ptr[7:0]  = din;
          4'hB: pp_ptr[15:8] = din;
          4'hC, 4'hD: begin
            if (pp_ptr == 16'h0104) begin
              if (sa[0]) rxctl[15:8] = din; else rxctl[7:0] = din;
            end
            if (pp_ptr == 16'h0112) begin
              if (sa[0]) linectl[15:8] = din; else linectl[7:0] = din;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
