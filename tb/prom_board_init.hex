a001
a002
a003
