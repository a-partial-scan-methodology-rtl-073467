// pscan_pkg: types shared by the partial-scan macromodule library.
//
// The scan path of the library is driven by four tester signals. Test1
// disables the normal gate (SEL, or the toggle input) of every scan latch so
// that only the scan input can load it; deasserting it alone performs a
// capture. Test2 switches every scan latch output from its first (master)
// stage to its second (slave) stage so that the network under test sees
// stable values while the latches are loaded. P1 and P2 are two
// non-overlapping scan clocks: P1 loads the master from the scan input, P2
// copies the master into the slave. Raising P1 and P2 together with Test2
// makes the whole chain transparent from scan input to scan output, which
// is how the latches are reset (they have no clear input).
package pscan_pkg;

  typedef struct packed {
    logic test1;  // scan mode: normal latch gates disabled
    logic test2;  // scan mode: latch outputs taken from the slave stage
    logic p1;     // scan clock phase 1: master <- scan input
    logic p2;     // scan clock phase 2: slave  <- master
  } scan_ctl_t;


endpackage
