// pcsb_bus_buffer: the 74LS245 three-state buffer bank of the PC slot buffer
// card.
//
// Address A9..A0 and the strobes IORD/IOWR go from the PC to the device, the
// 16-bit data bus goes either way and IRQ3/IRQ5 come back to the PC. The data
// buffers are turned towards the PC while IORD is low and towards the device
// otherwise, and they are enabled only while the decoder reports an address
// of the card, so the PC bus is never driven for foreign addresses and the
// device never sees foreign strobes. Three-state pins are split into a data
// input, a data output and an output enable, one per direction.
//
// Combinational, like the buffers it replaces. The signals buffered follow the
// system description; the gating of strobes and data with card_sel is this
// design's choice.
module pcsb_bus_buffer (
  input  logic        card_sel,   // address decoder: card addressed
  // PC side
  input  logic [9:0]  pc_addr,
  input  logic        pc_ior_n,
  input  logic        pc_iow_n,
  input  logic [15:0] pc_d_wr,    // data driven by the PC
  output logic [15:0] pc_d_rd,    // data driven towards the PC
  output logic        pc_d_oe,    // card drives the PC data bus
  output logic        pc_irq3,
  output logic        pc_irq5,
  // device side
  output logic [9:0]  sys_addr,
  output logic        sys_ior_n,
  output logic        sys_iow_n,
  output logic [15:0] sys_d_wr,   // data driven towards the device
  output logic        sys_d_oe,   // card drives the device data bus
  input  logic [15:0] sys_d_rd,   // data driven by the device
  input  logic        sys_irq3,
  input  logic        sys_irq5
);

  logic dir_to_pc;   // 74LS245 DIR
  logic data_en;     // 74LS245 /G, active high here

  always_comb begin
    dir_to_pc = !pc_ior_n;
    data_en   = card_sel && (!pc_ior_n || !pc_iow_n);
    sys_addr  = pc_addr;
    sys_ior_n = !(card_sel && !pc_ior_n);
    sys_iow_n = !(card_sel && !pc_iow_n);
    pc_d_oe   = data_en && dir_to_pc;
    sys_d_oe  = data_en && !dir_to_pc;
    pc_d_rd   = pc_d_oe  ? sys_d_rd : '0;
    sys_d_wr  = sys_d_oe ? pc_d_wr  : '0;
    pc_irq3   = sys_irq3;
    pc_irq5   = sys_irq5;
  end

  // The two directions of the data buffers are never enabled together.
  always_comb
    assert (!(pc_d_oe && sys_d_oe)) else $error("data buffers enabled in both directions");

endmodule
