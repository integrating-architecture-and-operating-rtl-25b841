// reloc_unit: per-processor memory relocation.
//
// A program's addresses are relative to its first word; at each reference
// they are relocated to a physical address {module, word}. The relocation
// registers select one of the strategies the document discusses:
//   RELOC_ONE_SEG  one segment: phys = BASE1 + la, fault when la >= LEN1
//                  (a base register with bound checking);
//   RELOC_TWO_SEG  one logical segment in two physical parts: la < LEN1 goes
//                  to BASE1 + la (the processor's own module), the rest to
//                  BASE2 + (la - LEN1) (contiguous words in the shared
//                  modules M_n..M_{2n-2});
//   RELOC_ABSOLUTE no relocation, allowed only for a privileged reference;
//                  otherwise a fault.
// In the document this is done by address-formation microprograms taking
// about two microcycles; here it is a two-stage pipeline: stage 1 compares
// and picks base and offset, stage 2 adds. The registers and the fault rule
// for an unprivileged absolute reference are this design's reading.
//
// Interface: write port (reg_we, reg_sel 0=BASE1 1=LEN1 2=BASE2 3=MODE,
// reg_wdata); in_valid/la/priv in, out_valid/pa/fault two cycles later. A
// new reference may enter every cycle.
module reloc_unit
  import mp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reg_we,
  input  logic [1:0]       reg_sel,
  input  logic [ADDRW-1:0] reg_wdata,
  input  logic             in_valid,
  input  logic [ADDRW-1:0] la,
  input  logic             priv,
  output logic             out_valid,
  output logic [ADDRW-1:0] pa,
  output logic             fault
);

  logic [ADDRW-1:0] base1, len1, base2;
  reloc_mode_e      mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base1 <= '0;
      len1  <= '0;
      base2 <= '0;
      mode  <= RELOC_ABSOLUTE;
    end else if (reg_we) begin
      unique case (reg_sel)
        2'd0: base1 <= reg_wdata;
        2'd1: len1  <= reg_wdata;
        2'd2: base2 <= reg_wdata;
        2'd3: mode  <= reloc_mode_e'(reg_wdata[1:0]);
      endcase
    end
  end

  // Stage 1: bound comparison, choice of base and offset.
  logic             s1_valid, s1_fault;
  logic [ADDRW-1:0] s1_base, s1_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_fault <= 1'b0;
      s1_base  <= '0;
      s1_off   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_fault <= 1'b0;
      s1_base  <= '0;
      s1_off   <= la;
      case (mode)
        RELOC_ONE_SEG: begin
          s1_base  <= base1;
          s1_fault <= la >= len1;
        end
        RELOC_TWO_SEG: begin
          if (la < len1) begin
            s1_base <= base1;
          end else begin
            s1_base <= base2;
            s1_off  <= la - len1;
          end
        end
        default: s1_fault <= !priv;  // absolute
      endcase
    end
  end

  // Stage 2: the addition.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pa        <= '0;
      fault     <= 1'b0;
    end else begin
      out_valid <= s1_valid;
      pa        <= s1_base + s1_off;
      fault     <= s1_fault;
    end
  end

endmodule
